// tb_selector_input: self-checking testbench for selector_input.
// Checks the reset mode (BPSK) and that each switch setting reaches `mode` exactly two
// clocks after it is set.
module tb_selector_input;
  import mod_pkg::*;
  logic clk = 0, rst = 1;
  logic [1:0] sw = 2'b10;
  mode_e mode;
  int checks = 0, failures = 0;

  selector_input dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: mode=%b sw=%b", what, mode, sw); end
  endtask

  initial begin
    logic [1:0] prev, v;
    repeat (2) @(posedge clk);
    #1 check(mode == MODE_BPSK, "reset mode");
    rst = 0; sw = 2'b00;
    repeat (2) begin @(posedge clk); #1; end
    prev = 2'b00;
    for (int i = 0; i < 100; i++) begin
      v = (i < 4) ? 2'(i) : 2'($urandom);
      sw = v;
      @(posedge clk); #1;
      check(mode == mode_e'(prev), "unchanged after one clock");
      @(posedge clk); #1;
      check(mode == mode_e'(v), "follows after two clocks");
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
