// tb_workload_ascii: the characters 'a', 'm' and 'v' sent through each modulator, at the
// default parameters, observed the way a logic analyser on the outputs would see them.
//
// For every character and mode the testbench lets the output settle, then captures
// 1024 consecutive samples of the in-phase and quadrature outputs and checks:
//  * the minimum and maximum of each output. For 'a' these are fixed numbers:
//    BPSK in-phase +/-8192; QPSK in-phase and quadrature +/-8192; 16-QAM in-phase
//    +/-24576 and quadrature +/-8192. For 'm' and 'v' they are 8192 times the largest
//    coordinate magnitude among the character's symbols, from the tables below;
//  * the bit rate: the character repeats every 8/k symbols of 100 clocks (k = 1, 2, 4
//    bits per symbol), so the output must equal itself 800/k clocks later, and the
//    symbol period must be 100 clocks (the output is not periodic with 800/k - 100
//    clocks' shift unless all symbols are equal, which none of these characters has).
module tb_workload_ascii;
  import mod_pkg::*;
  localparam int CPB = 868;
  localparam int NCAP = 1024;

  logic clk = 0, rst = 1, uart_rxd = 1;
  logic [1:0] sw_sel = 2'b00;
  logic signed [15:0] inphase_out, quadrature_out;
  logic out_valid;
  logic [7:0] rx_byte;
  mode_e mode;
  int checks = 0, failures = 0;

  modulator_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic uart_send(logic [7:0] b);
    logic [9:0] frame;
    frame = {1'b1, b, 1'b0};
    for (int i = 0; i < 10 * CPB; i++) begin
      uart_rxd = frame[i / CPB];
      @(posedge clk); #1;
    end
  endtask

  // largest |coordinate| (in units) on each axis over the symbols of a character;
  // 16-QAM outer bits: bit 0 for the imaginary (in-phase) axis, bit 3 for the real one
  task automatic expected_range(logic [7:0] ch, int m, output int ri, output int rq);
    int k, s;
    ri = 0; rq = 0;
    k = (m == 0) ? 1 : (m == 1) ? 2 : 4;
    for (int j = 0; j < 8 / k; j++) begin
      s = (int'(ch) >> (8 - k * (j + 1))) & ((1 << k) - 1);
      case (m)
        0: begin ri = 1; rq = 0; end
        1: begin ri = 1; rq = 1; end
        default: begin
          if ((s & 1) == 1) ri = 3; else if (ri == 0) ri = 1;
          if (((s >> 3) & 1) == 1) rq = 3; else if (rq == 0) rq = 1;
        end
      endcase
    end
  endtask

  int cap_i[NCAP + 800], cap_q[NCAP + 800];

  logic [7:0] chars[3] = '{"a", "m", "v"};
  string      names[3] = '{"BPSK", "QPSK", "16-QAM"};

  initial begin
    int mn_i, mx_i, mn_q, mx_q, ri, rq, per, same, sym_same;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int ci = 0; ci < 3; ci++) begin
      uart_send(chars[ci]);
      check(rx_byte == chars[ci], $sformatf("character %s received", chars[ci]));
      for (int m = 0; m < 3; m++) begin
        sw_sel = 2'(m);
        repeat (1000) @(posedge clk);
        #1;
        for (int n = 0; n < NCAP + 800; n++) begin
          cap_i[n] = int'(inphase_out); cap_q[n] = int'(quadrature_out);
          @(posedge clk); #1;
        end
        mn_i = 0; mx_i = 0; mn_q = 0; mx_q = 0;
        for (int n = 0; n < NCAP; n++) begin
          if (cap_i[n] < mn_i) mn_i = cap_i[n];
          if (cap_i[n] > mx_i) mx_i = cap_i[n];
          if (cap_q[n] < mn_q) mn_q = cap_q[n];
          if (cap_q[n] > mx_q) mx_q = cap_q[n];
        end
        expected_range(chars[ci], m, ri, rq);
        if (chars[ci] == "a") begin
          ri = (m == 2) ? 3 : 1;
          rq = (m == 0) ? 0 : 1;
        end
        $display("'%s' %-6s in-phase %6d..%6d  quadrature %6d..%6d", chars[ci], names[m], mn_i, mx_i, mn_q, mx_q);
        check(mx_i == 8192 * ri && mn_i == -8192 * ri, $sformatf("'%s' %s in-phase range", chars[ci], names[m]));
        check(mx_q == 8192 * rq && mn_q == -8192 * rq, $sformatf("'%s' %s quadrature range", chars[ci], names[m]));
        check(out_valid, "output valid");
        // character period 800/k clocks
        per = (m == 0) ? 800 : (m == 1) ? 400 : 200;
        same = 1; sym_same = 1;
        for (int n = 0; n < NCAP; n++) begin
          if (cap_i[n] != cap_i[n + per] || cap_q[n] != cap_q[n + per]) same = 0;
          if (cap_i[n] != cap_i[n + 100] || cap_q[n] != cap_q[n + 100]) sym_same = 0;
        end
        check(same == 1, $sformatf("'%s' %s repeats every %0d clocks", chars[ci], names[m], per));
        check(sym_same == 0, $sformatf("'%s' %s symbols differ from one 100-clock period to the next", chars[ci], names[m]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
