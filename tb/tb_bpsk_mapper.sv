// tb_bpsk_mapper: self-checking testbench for bpsk_mapper.
// Drives every input value in random order, with random gaps between strobes, and checks
// that the point appears exactly one clock after `valid_in` together with a one-clock
// `valid_out`, and that it is held while no new symbol arrives. Expected points come
// from the table written out below (1.0 = 1024).
module tb_bpsk_mapper;
  logic clk = 0, reset = 1, valid_in = 0;
  logic [1-1:0] data_in = '0;
  logic signed [15:0] data_out_real, data_out_imag;
  logic valid_out;
  int checks = 0, failures = 0;

  bpsk_mapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_real(int v); return 0; endfunction
  function automatic int exp_imag(int v); return (v != 0) ? 1024 : -1024; endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: real=%0d imag=%0d valid_out=%0b", what, $time, data_out_real, data_out_imag, valid_out);
    end
  endtask

  initial begin
    int v, er, ei;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    check(data_out_real == 0 && data_out_imag == 0 && !valid_out, "reset value");
    for (int n = 0; n < 40 * (1 << 1); n++) begin
      v = (n < (1 << 1)) ? n : int'($urandom_range((1 << 1) - 1));
      er = exp_real(v); ei = exp_imag(v);
      valid_in = 1; data_in = 1'(v);
      @(posedge clk); #1;
      valid_in = 0; data_in = ~data_in;
      check(valid_out == 1, "valid_out one clock after valid_in");
      check(int'(data_out_real) == er && int'(data_out_imag) == ei, $sformatf("point for %0d", v));
      repeat ($urandom_range(3)) begin
        @(posedge clk); #1;
        check(valid_out == 0, "valid_out is a single pulse");
        check(int'(data_out_real) == er && int'(data_out_imag) == ei, "point held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
