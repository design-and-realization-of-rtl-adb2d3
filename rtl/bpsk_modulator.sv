// bpsk_modulator: BPSK modulator: mapper, carrier generator and one mixer.
//
// A one-bit symbol arrives with a one-clock `valid_in` strobe. The mapper puts it on the
// imaginary (in-phase) axis as -1 or +1 (1.0 = 1024); its real (quadrature) coordinate is
// always 0, so only the in-phase path is built: the output is the coordinate times the
// sine carrier, peaking at +/-8192. The quadrature output of a BPSK modulator is
// identically zero and is left out (the system output stage supplies the zero). This
// needs a single multiplier for BPSK against two for QPSK and for 16-QAM.
// The carrier generator is this modulator's own and starts from phase 0 at reset; the
// symbol source must send strobes in the cycles where the carrier phase is 0.
// Timing: a strobe in cycle t changes the output from cycle t+2 on, the first output
// being the product with carrier sample 0. `valid_out` goes high with the first output
// that carries a symbol and stays high until reset.
module bpsk_modulator
  import mod_pkg::*;
#(
  parameter int unsigned PERIOD    = 100,
  parameter int          AMPLITUDE = 8192
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    valid_in,
  input  logic    data_in,
  output sample_t inphase_out,
  output logic    valid_out
);

  sample_t re, im, s;
  logic    map_valid;

  bpsk_mapper u_mapper (
    .clk, .reset(rst), .valid_in, .data_in,
    .data_out_real(re), .data_out_imag(im), .valid_out(map_valid)
  );

  sincos_gen #(.PERIOD(PERIOD), .AMPLITUDE(AMPLITUDE)) u_carrier (
    .clk, .rst, .sin_out(s), .cos_out(), .phase()
  );

  mixer u_mix_i (.clk, .rst, .coord(im), .carrier(s), .product(inphase_out));

  // The first product of a new symbol leaves the mixer one clock after the mapper
  // shows it, so a flag set by the mapper's first valid_out lines up with it.
  always_ff @(posedge clk) begin
    if (rst)            valid_out <= 1'b0;
    else if (map_valid) valid_out <= 1'b1;
  end

endmodule
