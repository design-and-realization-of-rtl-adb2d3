// qpsk_mapper: maps two bits to a QPSK constellation point.
//
// The table is the document's: 00 -> (real +1, imag -1), 01 -> (-1, -1),
// 10 -> (+1, +1), 11 -> (-1, +1). So the second bit sets the sign of the real
// (quadrature) coordinate and the first bit the sign of the imaginary (in-phase) one.
// Coordinates are 16-bit with 1.0 = 1024.
// Timing: registered on a clock with `valid_in` high, visible one clock later with a
// one-clock `valid_out`, held until the next symbol. Reset clears the point to (0, 0).
module qpsk_mapper
  import mod_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       valid_in,
  input  logic [1:0] data_in,
  output sample_t    data_out_real,
  output sample_t    data_out_imag,
  output logic       valid_out
);

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out_real <= '0;
      data_out_imag <= '0;
      valid_out     <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        data_out_real <= data_in[0] ? COORD_M1 : COORD_P1;
        data_out_imag <= data_in[1] ? COORD_P1 : COORD_M1;
      end
    end
  end

endmodule
