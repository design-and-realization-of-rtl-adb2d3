// qpsk_modulator: QPSK modulator: mapper, sine/cosine carrier generator and mixers.
//
// A symbol of 2 bit(s) arrives with a one-clock `valid_in` strobe. The mapper turns it
// into a constellation point (real = quadrature, imaginary = in-phase, 1.0 = 1024) and
// holds it until the next strobe. The in-phase output is the imaginary coordinate times
// the sine carrier; the quadrature output is the real coordinate times the cosine
// carrier. The carrier generator is this modulator's own, as in the document, and
// starts from phase 0 at reset; the symbol source must send strobes in the clock
// cycles where the carrier phase is 0 (every PERIOD clocks) so that each symbol starts
// at the start of a carrier period.
// Timing: a strobe in cycle t changes the outputs from cycle t+2 on, the first of
// them being the product with carrier sample 0. `valid_out` goes high with the first
// output that carries a symbol and stays high until reset.
// The pairing of sine with in-phase and cosine with quadrature follows the order in
// which the document lists them.
module qpsk_modulator
  import mod_pkg::*;
#(
  parameter int unsigned PERIOD    = 100,
  parameter int          AMPLITUDE = 8192
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       valid_in,
  input  logic [1:0] data_in,
  output sample_t    inphase_out,
  output sample_t    quadrature_out,
  output logic       valid_out
);

  sample_t re, im, s, c;
  logic    map_valid;

  qpsk_mapper u_mapper (
    .clk, .reset(rst), .valid_in, .data_in,
    .data_out_real(re), .data_out_imag(im), .valid_out(map_valid)
  );

  sincos_gen #(.PERIOD(PERIOD), .AMPLITUDE(AMPLITUDE)) u_carrier (
    .clk, .rst, .sin_out(s), .cos_out(c), .phase()
  );

  mixer u_mix_i (.clk, .rst, .coord(im), .carrier(s), .product(inphase_out));
  mixer u_mix_q (.clk, .rst, .coord(re), .carrier(c), .product(quadrature_out));

  // The first product of a new symbol leaves the mixer one clock after the mapper
  // shows it, so a flag set by the mapper's first valid_out lines up with it.
  always_ff @(posedge clk) begin
    if (rst)            valid_out <= 1'b0;
    else if (map_valid) valid_out <= 1'b1;
  end

endmodule
