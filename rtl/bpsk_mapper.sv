// bpsk_mapper: maps one bit to a BPSK constellation point.
//
// Following the document: bit 0 gives real (quadrature) 0 and imaginary (in-phase) -1;
// bit 1 gives real 0 and imaginary +1. Coordinates are 16-bit with 1.0 = 1024.
// Timing: on a clock with `valid_in` high the point is registered; it appears one clock
// later, with `valid_out` high for that one clock, and is held until the next symbol.
// Reset clears both coordinates to 0. data_out_real is always 0 for BPSK; the port is kept
// so that all three mappers share one interface.
module bpsk_mapper
  import mod_pkg::*;
(
  input  logic    clk,
  input  logic    reset,
  input  logic    valid_in,
  input  logic    data_in,
  output sample_t data_out_real,
  output sample_t data_out_imag,
  output logic    valid_out
);

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out_real <= '0;
      data_out_imag <= '0;
      valid_out     <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        data_out_real <= '0;
        data_out_imag <= data_in ? COORD_P1 : COORD_M1;
      end
    end
  end

endmodule
