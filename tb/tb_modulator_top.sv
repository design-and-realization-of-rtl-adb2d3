// tb_modulator_top: end-to-end testbench of the whole modulator at its default
// parameters (115200 baud at 868 clocks per bit, 100-clock carrier, peak 8192).
//
// A UART sender types the characters 'a', 'm' and 'v' (and a few random ones) while
// the modulator-select switches are moved through BPSK, QPSK, 16-QAM and the unused
// code 11. A reference model of the system, written from the specification and fed
// only with the top's observable ports (held character and synchronized mode), predicts
// every output sample: which bits form each symbol, the constellation point, the sine and
// cosine carriers and the pipeline delays. Every clock the in-phase, quadrature and valid
// outputs are compared with it. The held character is also checked against what was sent,
// and the mode code against the switches.
//
// Mechanisms counted (each must happen at least once): character received, character
// replaced while being sent, symbols sent in each of the three modes, mode code 11 (no
// output), and a character restarted because the mode changed in mid-character.
module tb_modulator_top;
  import mod_pkg::*;
  localparam int CPB   = 868;
  localparam int P     = 100;
  localparam int NCYC  = 140000;

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
    #((NCYC + 200) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- UART sender ----------------
  logic [7:0] tx_q[$];
  logic [7:0] last_sent = 0;
  int         sent = 0;

  initial begin
    logic [9:0] frame;
    @(negedge rst);
    forever begin
      if (tx_q.size() == 0) begin
        @(posedge clk);
      end else begin
        frame = {1'b1, tx_q[0], 1'b0};
        for (int i = 0; i < 10 * CPB; i++) begin
          #1 uart_rxd = frame[i / CPB];
          @(posedge clk);
        end
        last_sent = tx_q.pop_front();
        sent++;
      end
    end
  end

  // ---------------- reference model ----------------
  int sin_t[P], cos_t[P];
  int map_i[3][NCYC], map_q[3][NCYC];   // mapper register value in each clock
  int mode_h[NCYC];
  int first_strobe[3] = '{-1, -1, -1};
  int m_pos = 8, m_last = 3, exp_mod = -1, prev_mod = -1;
  logic [7:0] m_sh;
  logic [3:0] exp_sym = 0, prev_sym = 0;
  int cnt_rx = 0, cnt_replace = 0, cnt_restart = 0, cnt_none = 0;
  int cnt_sym[3] = '{0, 0, 0};

  function automatic int mix(int coord, int car);
    longint p;
    logic signed [15:0] r;
    p = longint'(coord) * longint'(car);
    r = 16'(p >>> 10);
    return int'(r);
  endfunction

  function automatic int qlev(int b);
    case (b & 3)
      0: return -1024;
      1: return -3072;
      2: return 1024;
      default: return 3072;
    endcase
  endfunction

  // carrier sample on the generator output in clock y
  function automatic int car(int y, bit cosine);
    if (y < 1) return 0;
    return cosine ? cos_t[(y - 1) % P] : sin_t[(y - 1) % P];
  endfunction

  // output of modulator m in clock x
  function automatic int mod_i(int m, int x);
    if (x < 1) return 0;
    return mix(map_i[m][x - 1], car(x - 1, 0));
  endfunction
  function automatic int mod_q(int m, int x);
    if (x < 1 || m == 0) return 0;
    return mix(map_q[m][x - 1], car(x - 1, 1));
  endfunction
  function automatic bit mod_v(int m, int x);
    return first_strobe[m] >= 0 && x >= first_strobe[m] + 2;
  endfunction

  task automatic model_decide(int c);
    logic [7:0] cur;
    int k;
    bit restart;
    restart = (m_pos >= 8) || (int'(mode) != m_last);
    if (restart && m_pos < 8) cnt_restart++;
    m_last = int'(mode);
    k = (mode == MODE_BPSK) ? 1 : (mode == MODE_QPSK) ? 2 : (mode == MODE_QAM16) ? 4 : 0;
    if (cnt_rx > 0 && k != 0) begin
      cur = restart ? rx_byte : m_sh;
      exp_sym = 4'(cur >> (8 - k));
      m_sh = cur << k;
      m_pos = (restart ? 0 : m_pos) + k;
      exp_mod = int'(mode);
      cnt_sym[exp_mod]++;
    end else begin
      m_pos = 8;
      exp_mod = -1;
    end
  endtask

  task automatic run(int ncycles);
    repeat (ncycles) begin
      tick();
    end
  endtask

  int c = 0;
  logic [7:0] prev_byte = 0;
  logic [1:0] sw_h[3] = '{0, 0, 0};

  task automatic tick();
    int mm, ei, eq;
    bit ev;
    // mapper registers this clock: previous value, or the symbol strobed last clock
    for (int m = 0; m < 3; m++) begin
      map_i[m][c] = (c == 0) ? 0 : map_i[m][c - 1];
      map_q[m][c] = (c == 0) ? 0 : map_q[m][c - 1];
    end
    if (prev_mod >= 0) begin
      case (prev_mod)
        0: begin map_i[0][c] = prev_sym[0] ? 1024 : -1024; map_q[0][c] = 0; end
        1: begin map_i[1][c] = prev_sym[1] ? 1024 : -1024; map_q[1][c] = prev_sym[0] ? -1024 : 1024; end
        default: begin map_i[2][c] = qlev(int'(prev_sym[1:0])); map_q[2][c] = qlev(int'({prev_sym[2], prev_sym[3]})); end
      endcase
      if (first_strobe[prev_mod] < 0) first_strobe[prev_mod] = c - 1;
    end
    mode_h[c] = int'(mode);
    // mode code follows the switches two clocks late
    if (c >= 2) check(mode == mode_e'(sw_h[1]), "mode follows switches");
    // held character
    if (rx_byte != prev_byte) begin
      cnt_rx++;
      if (m_pos < 8 && cnt_rx > 1) cnt_replace++;
      prev_byte = rx_byte;
    end
    if (mode == MODE_NONE) cnt_none++;
    // expected outputs
    if (c == 0) begin
      ei = 0; eq = 0; ev = 0;
    end else begin
      mm = mode_h[c - 1];
      if (mm == 3) begin
        ei = 0; eq = 0; ev = 0;
      end else begin
        ei = mod_i(mm, c - 1); eq = mod_q(mm, c - 1); ev = mod_v(mm, c - 1);
      end
    end
    check(int'(inphase_out) == ei, $sformatf("in-phase: got %0d expected %0d", inphase_out, ei));
    check(int'(quadrature_out) == eq, $sformatf("quadrature: got %0d expected %0d", quadrature_out, eq));
    check(out_valid == ev, $sformatf("out_valid: got %0b expected %0b", out_valid, ev));
    // selector decision at the last clock of each symbol period
    prev_mod = exp_mod;                 // strobe in this clock, seen by the mapper next clock
    prev_sym = exp_sym;
    if (c % P == P - 1) model_decide(c); else exp_mod = -1;
    sw_h[1] = sw_h[0]; sw_h[0] = sw_sel;
    c++;
    @(posedge clk); #2;
  endtask

  task automatic send_and_wait(logic [7:0] b);
    int s0;
    s0 = sent;
    tx_q.push_back(b);
    while (sent == s0) tick();
    run(3);
    check(rx_byte == b, $sformatf("character %h held after reception", b));
  endtask

  initial begin
    for (int n = 0; n < P; n++) begin
      sin_t[n] = $rtoi($floor(8192.0 * $sin(2.0 * 3.141592653589793 * n / P) + 0.5));
      cos_t[n] = $rtoi($floor(8192.0 * $cos(2.0 * 3.141592653589793 * n / P) + 0.5));
    end
    repeat (3) @(posedge clk);
    #2 rst = 0;                         // clock 0 of the model
    sw_h = '{0, 0, 0};
    run(3 * P);                         // no character yet: output idle
    send_and_wait("a");                 // BPSK
    run(16 * P + 37);
    sw_sel = 2'b01;  run(12 * P);       // QPSK, 'a'
    sw_sel = 2'b10;  run(6 * P + 11);   // 16-QAM, 'a'
    sw_sel = 2'b00;  run(3 * P);        // back to BPSK, mid-character below
    sw_sel = 2'b01;  run(5 * P);
    send_and_wait("m");                 // arrives while QPSK sends 'a'
    run(8 * P);
    sw_sel = 2'b11;  run(4 * P);        // unused code: no output
    sw_sel = 2'b10;  run(2 * P + 50);
    send_and_wait("v");                 // 16-QAM
    run(6 * P);
    for (int n = 0; n < 4; n++) begin   // random characters and modes
      sw_sel = 2'($urandom_range(2));
      send_and_wait(8'($urandom_range(126, 32)));
      run($urandom_range(3 * P, P));
    end
    check(cnt_rx >= 3, "characters received");
    check(cnt_replace >= 1, "character replaced while being sent");
    check(cnt_sym[0] > 0, "BPSK symbols sent");
    check(cnt_sym[1] > 0, "QPSK symbols sent");
    check(cnt_sym[2] > 0, "16-QAM symbols sent");
    check(cnt_none > 0, "mode code 11 seen");
    check(cnt_restart >= 1, "restart on mode change");
    $display("mechanisms: received=%0d replaced=%0d bpsk=%0d qpsk=%0d qam16=%0d none_clocks=%0d restarts=%0d clocks=%0d",
             cnt_rx, cnt_replace, cnt_sym[0], cnt_sym[1], cnt_sym[2], cnt_none, cnt_restart, c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
