// selector_input: reads the two modulator-select switches.
//
// The switches are asynchronous to the system clock, so each passes through two
// flip-flops before the rest of the design sees it; `mode` follows `sw` two clocks
// later. Codes (from the document): 00 BPSK, 01 QPSK, 10 16-QAM; 11 selects nothing.
// Reset sets the mode to BPSK (this design's choice).
module selector_input
  import mod_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] sw,
  output mode_e      mode
);

  logic [1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= 2'b00;
      mode <= MODE_BPSK;
    end else begin
      meta <= sw;
      mode <= mode_e'(meta);
    end
  end

endmodule
