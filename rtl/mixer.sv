// mixer: multiplies a constellation coordinate by a carrier sample.
//
// product = (coord * carrier) >>> SHIFT, kept to 16 bits. With coordinates scaled
// 1.0 = 1024 (SHIFT = 10) the product has the carrier's scale, so +/-1 gives a peak of
// +/-8192 and +/-3 a peak of +/-24576, the levels of the document's hardware captures;
// the shift amount is this design's choice. The arithmetic shift rounds toward minus
// infinity. One signed multiplier per mixer.
// Timing: registered, one clock from inputs to `product`.
module mixer
  import mod_pkg::*;
#(
  parameter int unsigned SHIFT = COORD_FRAC
) (
  input  logic    clk,
  input  logic    rst,
  input  sample_t coord,
  input  sample_t carrier,
  output sample_t product
);

  logic signed [2*SAMPLE_W-1:0] full;

  assign full = coord * carrier;

  always_ff @(posedge clk) begin
    if (rst) product <= '0;
    else     product <= sample_t'(full >>> SHIFT);
  end

endmodule
