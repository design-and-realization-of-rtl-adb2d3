// uart_buffer: holds the last character received from the UART.
//
// The modulators keep transmitting the held character over and over; a new character
// replaces it on the clock edge that sees `in_valid`. `have_data` goes high with the
// first character after reset and stays high, so that nothing is transmitted before a
// character has arrived. Holding and replacing the character follows the document;
// the `have_data` flag and the reset value 0 are this design's choices.
// Timing: `data` changes one clock after `in_valid`.
module uart_buffer (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic [7:0] data,
  output logic       have_data
);

  always_ff @(posedge clk) begin
    if (rst) begin
      data      <= '0;
      have_data <= 1'b0;
    end else if (in_valid) begin
      data      <= in_data;
      have_data <= 1'b1;
    end
  end

endmodule
