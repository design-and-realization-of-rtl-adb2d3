// qam16_mapper: maps four bits to a 16-QAM constellation point.
//
// Each axis uses the map (sign bit, outer bit): 00 -> -1, 01 -> -3, 10 -> +1, 11 -> +3
// (see mod_pkg::qam16_level). The imaginary (in-phase) coordinate takes data_in[1:0]
// as (sign, outer); the real (quadrature) coordinate takes data_in[3:2] the other way
// round, data_in[2] as sign and data_in[3] as outer bit. Both axes are Gray coded.
// The document states two points, 0000 -> (-1, -1) and 0001 -> (-1, -3); the rest of
// the table is this design's completion, chosen so that the character 'a' (symbols
// 0110 and 0001) gives the in-phase range +/-24576 and the quadrature range +/-8192
// recorded on the original hardware. Coordinates are 16-bit with 1.0 = 1024.
// Timing: registered on a clock with `valid_in` high, visible one clock later with a
// one-clock `valid_out`, held until the next symbol. Reset clears the point to (0, 0).
module qam16_mapper
  import mod_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       valid_in,
  input  logic [3:0] data_in,
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
        data_out_real <= qam16_level({data_in[2], data_in[3]});
        data_out_imag <= qam16_level(data_in[1:0]);
      end
    end
  end

endmodule
