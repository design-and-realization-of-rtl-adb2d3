// tb_selector_modulator: self-checking testbench for selector_modulator, with a symbol
// period of 10 clocks.
// A reference model, run alongside, decides at the last clock of every symbol period
// which modulator gets a symbol and which bits it carries (most significant bit first,
// the character restarting after 8 bits or when the mode changes). Every clock the three
// strobes are compared with the model, and at every strobe the symbol. The run covers an
// empty buffer, 'a' in BPSK (whose 16 bits must read 01100001 twice), a change of
// character mid-way, all three modes, mode changes in mid-character and the unused code 11.
module tb_selector_modulator;
  import mod_pkg::*;
  localparam int P = 10;
  logic clk = 0, rst = 1;
  mode_e mode = MODE_BPSK;
  logic [7:0] char_in = 0;
  logic char_ok = 0;
  logic bpsk_valid, bpsk_sym, qpsk_valid, qam_valid;
  logic [1:0] qpsk_sym;
  logic [3:0] qam_sym, bit_pos;
  int checks = 0, failures = 0;

  selector_modulator #(.SYMBOL_CLKS(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: v=%b%b%b syms=%b %b %b", what, $time, bpsk_valid, qpsk_valid, qam_valid, bpsk_sym, qpsk_sym, qam_sym);
    end
  endtask

  // reference model state
  int         m_pos = 8;
  logic [1:0] m_last = 2'b11;
  logic [7:0] m_sh;
  int         exp_mod = -1;    // modulator expected to get a strobe this clock (-1: none)
  logic [3:0] exp_sym;
  logic [7:0] bpsk_bits;
  int         nbpsk = 0;

  task automatic model_decide();
    logic [7:0] cur;
    int k;
    bit restart;
    restart = (m_pos >= 8) || (mode != m_last);
    m_last = mode;
    k = (mode == 2'b00) ? 1 : (mode == 2'b01) ? 2 : (mode == 2'b10) ? 4 : 0;
    if (char_ok && k != 0) begin
      cur = restart ? char_in : m_sh;
      exp_sym = 4'(cur >> (8 - k));
      m_sh = cur << k;
      m_pos = (restart ? 0 : m_pos) + k;
      exp_mod = int'(mode);
    end else begin
      m_pos = 8;
      exp_mod = -1;
    end
  endtask

  // one clock: check strobes against the model, let the model decide, advance
  task automatic step(int c);
    check(bpsk_valid == (exp_mod == 0) && qpsk_valid == (exp_mod == 1) && qam_valid == (exp_mod == 2), "strobes");
    if (exp_mod == 0) begin
      check(bpsk_sym == exp_sym[0], "BPSK symbol");
      if (nbpsk < 16 && char_in == "a") begin bpsk_bits[7 - (nbpsk % 8)] = bpsk_sym; nbpsk++;
        if (nbpsk % 8 == 0) check(bpsk_bits == 8'b01100001, "BPSK bit order of 'a'"); end
    end
    if (exp_mod == 1) check(qpsk_sym == exp_sym[1:0], "QPSK symbol");
    if (exp_mod == 2) check(qam_sym == exp_sym, "16-QAM symbol");
    if (c % P == P - 1) model_decide(); else exp_mod = -1;
    @(posedge clk); #1;
  endtask

  initial begin
    int c;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    c = 0;
    for (int i = 0; i < 5 * P; i++) step(c++);           // empty buffer: nothing sent
    char_in = "a"; char_ok = 1;
    for (int i = 0; i < 20 * P; i++) step(c++);          // 'a' in BPSK
    for (int i = 0; i < 3 * P + 4; i++) step(c++);
    char_in = "m";                                         // new character mid-way
    for (int i = 0; i < 12 * P; i++) step(c++);
    mode = MODE_QPSK;  for (int i = 0; i < 9 * P; i++) step(c++);
    char_in = "v";
    mode = MODE_QAM16; for (int i = 0; i < 7 * P; i++) step(c++);
    mode = MODE_NONE;  for (int i = 0; i < 4 * P; i++) step(c++);
    mode = MODE_QPSK;  for (int i = 0; i < 5 * P; i++) step(c++);
    for (int n = 0; n < 200; n++) begin                    // random changes
      if ($urandom_range(3) == 0) mode = mode_e'($urandom_range(3));
      if ($urandom_range(7) == 0) char_in = 8'($urandom);
      if ($urandom_range(31) == 0) char_ok = 0; else char_ok = 1;
      repeat ($urandom_range(2 * P, 1)) step(c++);
    end
    check(nbpsk == 16, "BPSK bits of 'a' collected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
