// modulator_output: passes the outputs of the selected modulator to the output pins.
//
// All three modulators run side by side; this stage shows the in-phase and quadrature
// outputs of the one chosen by `mode` (00 BPSK, 01 QPSK, 10 16-QAM). BPSK has no
// quadrature component, so its quadrature output is 0. Code 11 selects no modulator:
// the outputs are 0 and `out_valid` is low.
// Timing: registered, one clock from inputs to outputs; reset clears them.
module modulator_output
  import mod_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  mode_e   mode,
  input  sample_t bpsk_i,
  input  logic    bpsk_v,
  input  sample_t qpsk_i,
  input  sample_t qpsk_q,
  input  logic    qpsk_v,
  input  sample_t qam_i,
  input  sample_t qam_q,
  input  logic    qam_v,
  output sample_t inphase_out,
  output sample_t quadrature_out,
  output logic    out_valid
);

  always_ff @(posedge clk) begin
    if (rst) begin
      inphase_out    <= '0;
      quadrature_out <= '0;
      out_valid      <= 1'b0;
    end else begin
      case (mode)
        MODE_BPSK:  begin inphase_out <= bpsk_i; quadrature_out <= '0;     out_valid <= bpsk_v; end
        MODE_QPSK:  begin inphase_out <= qpsk_i; quadrature_out <= qpsk_q; out_valid <= qpsk_v; end
        MODE_QAM16: begin inphase_out <= qam_i;  quadrature_out <= qam_q;  out_valid <= qam_v;  end
        default:    begin inphase_out <= '0;     quadrature_out <= '0;     out_valid <= 1'b0;   end
      endcase
    end
  end

endmodule
