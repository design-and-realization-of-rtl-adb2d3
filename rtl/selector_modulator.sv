// selector_modulator: routes the buffered character to the selected modulator.
//
// Every SYMBOL_CLKS clocks (one carrier period, 100 clocks by default) it takes the next
// 1, 2 or 4 bits of the character, most significant bit first, and hands them to the
// modulator chosen by `mode` (00 BPSK, 01 QPSK, 10 16-QAM) with a one-clock strobe.
// Only the selected modulator receives strobes; the others keep their last symbol.
// When all eight bits are used, or when the mode changes, the next symbol starts again
// from the most significant bit of the character then in the buffer, so the held
// character is sent repeatedly and a new one takes over at the next character start.
// Nothing is sent while the buffer is empty or the mode code is 11.
//
// Timing: a free-running counter counts 0..SYMBOL_CLKS-1 from reset. The decision is
// registered at count SYMBOL_CLKS-1, so a strobe is high in the clock cycles where the
// count is 0. The carrier generators run from the same reset with the same period, so
// each new symbol reaches a mapper as its carrier restarts at phase 0.
// The document gives the mode codes and says the selector passes the input to the
// selected modulator; bit order, symbol pacing and restart rules are this design's.
module selector_modulator
  import mod_pkg::*;
#(
  parameter int unsigned SYMBOL_CLKS = 100
) (
  input  logic       clk,
  input  logic       rst,
  input  mode_e      mode,
  input  logic [7:0] char_in,
  input  logic       char_ok,
  output logic       bpsk_valid,
  output logic       bpsk_sym,
  output logic       qpsk_valid,
  output logic [1:0] qpsk_sym,
  output logic       qam_valid,
  output logic [3:0] qam_sym,
  output logic [3:0] bit_pos      // bits of the current character already sent
);

  localparam int unsigned CW = $clog2(SYMBOL_CLKS);

  logic [CW-1:0] cnt;
  logic [7:0]    shreg;
  mode_e         last_mode;
  logic [7:0]    cur;
  logic          restart;
  int unsigned   k;

  always_comb begin
    k       = bits_per_symbol(mode);
    restart = (bit_pos >= 4'd8) || (mode != last_mode);
    cur     = restart ? char_in : shreg;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= '0;
      shreg      <= '0;
      bit_pos    <= 4'd8;
      last_mode  <= MODE_NONE;
      bpsk_valid <= 1'b0;
      qpsk_valid <= 1'b0;
      qam_valid  <= 1'b0;
      bpsk_sym   <= 1'b0;
      qpsk_sym   <= '0;
      qam_sym    <= '0;
    end else begin
      bpsk_valid <= 1'b0;
      qpsk_valid <= 1'b0;
      qam_valid  <= 1'b0;
      cnt <= (cnt == CW'(SYMBOL_CLKS - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(SYMBOL_CLKS - 1)) begin
        last_mode <= mode;
        if (char_ok && mode != MODE_NONE) begin
          shreg   <= cur << k;
          bit_pos <= (restart ? 4'd0 : bit_pos) + 4'(k);
          case (mode)
            MODE_BPSK:  begin bpsk_valid <= 1'b1; bpsk_sym <= cur[7];    end
            MODE_QPSK:  begin qpsk_valid <= 1'b1; qpsk_sym <= cur[7:6];  end
            default:    begin qam_valid  <= 1'b1; qam_sym  <= cur[7:4];  end
          endcase
        end else begin
          bit_pos <= 4'd8;
        end
      end
    end
  end

  // At most one modulator gets a symbol at a time, and only in a clock where the
  // carriers are at phase 0 (count 0).
  a_one_target: assert property (@(posedge clk) disable iff (rst)
    $onehot0({bpsk_valid, qpsk_valid, qam_valid}));
  a_on_boundary: assert property (@(posedge clk) disable iff (rst)
    (bpsk_valid || qpsk_valid || qam_valid) |-> cnt == '0);

endmodule
