// sincos_gen: sine and cosine carrier generator.
//
// A phase counter steps through 0..PERIOD-1 and addresses two constant tables,
//   SIN[n] = round(AMPLITUDE * sin(2*pi*n/PERIOD)),  COS[n] = round(AMPLITUDE * cos(2*pi*n/PERIOD)),
// computed at elaboration. With the defaults one carrier period is 100 clocks (as in the
// document's carrier) and the peak is +/-8192, which with a unit symbol gives the
// +/-8192 passband peak of the document's hardware captures.
// Timing: the outputs are registered; `phase` is the table index of the samples now on
// `sin_out` / `cos_out`. After reset the first sample pair is index 0 (sin 0,
// cos AMPLITUDE) one clock after reset is released. Table generation by lookup is this
// design's choice; the document only names a sine and cosine generator.
module sincos_gen
  import mod_pkg::*;
#(
  parameter int unsigned PERIOD    = 100,
  parameter int          AMPLITUDE = 8192
) (
  input  logic                      clk,
  input  logic                      rst,
  output sample_t                   sin_out,
  output sample_t                   cos_out,
  output logic [$clog2(PERIOD)-1:0] phase
);

  localparam int unsigned PW = $clog2(PERIOD);
  localparam real         TWO_PI = 6.283185307179586;

  typedef sample_t table_t [PERIOD];

  function automatic table_t make_table(bit cosine);
    table_t t;
    for (int n = 0; n < PERIOD; n++) begin
      real a;
      a = TWO_PI * n / PERIOD;
      t[n] = sample_t'($rtoi($floor(AMPLITUDE * (cosine ? $cos(a) : $sin(a)) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t SIN_TAB = make_table(1'b0);
  localparam table_t COS_TAB = make_table(1'b1);

  logic [PW-1:0] ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph      <= '0;
      phase   <= '0;
      sin_out <= '0;
      cos_out <= '0;
    end else begin
      ph      <= (ph == PW'(PERIOD - 1)) ? '0 : ph + 1'b1;
      phase   <= ph;
      sin_out <= SIN_TAB[ph];
      cos_out <= COS_TAB[ph];
    end
  end

endmodule
