// tb_sincos_gen: self-checking testbench for sincos_gen at its default size.
// Runs three carrier periods after reset and compares every sample with
// round(8192 * sin(2*pi*n/100)) and round(8192 * cos(2*pi*n/100)), worked out here
// with the simulator's real arithmetic. Also checks the period (100 clocks), the phase
// output and the known points sin 0 = 0, sin 25 = 8192, cos 0 = 8192, sin 75 = -8192.
module tb_sincos_gen;
  logic clk = 0, rst = 1;
  logic signed [15:0] sin_out, cos_out;
  logic [6:0] phase;
  int checks = 0, failures = 0;

  sincos_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: phase=%0d sin=%0d cos=%0d", what, $time, phase, sin_out, cos_out);
    end
  endtask

  initial begin
    int es, ec, n;
    real a;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;               // first sample pair after reset
    for (int c = 0; c < 300; c++) begin
      n  = c % 100;
      a  = 2.0 * 3.141592653589793 * n / 100.0;
      es = $rtoi($floor(8192.0 * $sin(a) + 0.5));
      ec = $rtoi($floor(8192.0 * $cos(a) + 0.5));
      check(int'(phase) == n, "phase index");
      check(int'(sin_out) == es, $sformatf("sin[%0d] expected %0d", n, es));
      check(int'(cos_out) == ec, $sformatf("cos[%0d] expected %0d", n, ec));
      if (n == 0)  check(sin_out == 0 && cos_out == 8192, "phase 0 point");
      if (n == 25) check(sin_out == 8192, "quarter period peak");
      if (n == 75) check(sin_out == -8192, "three-quarter period trough");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
