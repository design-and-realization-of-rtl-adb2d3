// tb_bpsk_modulator: self-checking testbench for bpsk_modulator at its default size (100-clock carrier,
// peak 8192).
// Sends random symbols, one per carrier period in the clocks where the carrier is at
// phase 0, and compares every output sample with
//   in-phase   = floor(imag * round(8192 sin(2 pi n / 100)) / 1024)
//   quadrature = floor(real * round(8192 cos(2 pi n / 100)) / 1024)
// where (real, imag) is the constellation point of the symbol, written out below, and n
// the carrier phase. The first sample of a symbol must appear two clocks after its strobe.
module tb_bpsk_modulator;
  logic clk = 0, rst = 1, valid_in = 0, valid_out;
  logic [1-1:0] data_in = '0;
  logic signed [15:0] inphase_out;
  int checks = 0, failures = 0;

  bpsk_modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int imag_of(int v); return (v != 0) ? 1024 : -1024; endfunction
  function automatic int real_of(int v); return 0; endfunction

  function automatic int carrier(int n, bit cosine);
    real a;
    a = 2.0 * 3.141592653589793 * (n % 100) / 100.0;
    return $rtoi($floor(8192.0 * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  function automatic int mix(int coord, int car);
    longint p;
    logic signed [15:0] r;
    p = longint'(coord) * longint'(car);
    r = 16'(p >>> 10);
    return int'(r);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int syms[40];
    int s, n, ei, eq;
    for (int i = 0; i < 40; i++) syms[i] = (i < (1 << 1)) ? i : int'($urandom_range((1 << 1) - 1));
    repeat (3) @(posedge clk);
    #1 rst = 0;                       // this clock is cycle 0, carrier phase 0
    for (int c = 0; c < 40 * 100 + 2; c++) begin
      valid_in = (c % 100 == 0) && (c < 40 * 100);
      data_in  = 1'(syms[(c / 100) % 40]);
      if (c < 2) begin
        check(!valid_out && inphase_out == 0, "idle before the first symbol");
      end else begin
        n = (c - 2) % 100;
        s = syms[(c - 2) / 100];
        ei = mix(imag_of(s), carrier(n, 0));
        eq = mix(real_of(s), carrier(n, 1));
        check(valid_out, "valid_out");
        check(int'(inphase_out) == ei, $sformatf("in-phase, symbol %0d phase %0d: got %0d expected %0d", s, n, inphase_out, ei));
        check(eq == 0, "BPSK has no quadrature part");
        if (n == 25) check(inphase_out == 16'(imag_of(s) * 8), "in-phase peak");
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
