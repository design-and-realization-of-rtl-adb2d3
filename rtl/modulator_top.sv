// modulator_top: digital BPSK / QPSK / 16-QAM modulator fed with ASCII characters over
// a UART.
//
// Data path: uart_rx receives 8-bit characters from a host computer; uart_buffer holds
// the last one; selector_modulator cuts it into 1-, 2- or 4-bit symbols, one per carrier
// period (CARRIER_CLKS clocks), and sends them to the modulator chosen on the two
// switches (selector_input: 00 BPSK, 01 QPSK, 10 16-QAM); each modulator maps its
// symbols to constellation points and multiplies them by its own sine and cosine
// carriers; modulator_output shows the in-phase and quadrature outputs of the selected
// modulator. The held character is sent again and again until a new one arrives.
//
// Interface: 16-bit two's-complement outputs; a unit symbol gives a peak of 8192 and an
// outer 16-QAM level 24576. `out_valid` is high once the selected modulator carries a
// symbol. `rx_byte` is the character in the buffer and `mode` the synchronized switch
// code, brought out for observation.
// Timing: with the default 100-clock carrier period and a 10 ns clock one symbol lasts
// 1 us, so the bit rate is 1, 2 and 4 Mbit/s for BPSK, QPSK and 16-QAM. The block
// structure, mode codes, mappings and carrier period follow the document; the UART
// frame and baud rate, the symbol pacing and the output scaling are this design's.
module modulator_top
  import mod_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = 868,
  parameter int unsigned CARRIER_CLKS = 100,
  parameter int          AMPLITUDE    = 8192
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       uart_rxd,
  input  logic [1:0] sw_sel,
  output sample_t    inphase_out,
  output sample_t    quadrature_out,
  output logic       out_valid,
  output logic [7:0] rx_byte,
  output mode_e      mode
);

  logic [7:0] rx_data;
  logic       rx_valid, char_ok;
  logic       bpsk_v_in, bpsk_sym, qpsk_v_in, qam_v_in;
  logic [1:0] qpsk_sym;
  logic [3:0] qam_sym, bit_pos;
  sample_t    bpsk_i, qpsk_i, qpsk_q, qam_i, qam_q;
  logic       bpsk_v, qpsk_v, qam_v;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid)
  );

  uart_buffer u_buffer (
    .clk, .rst, .in_valid(rx_valid), .in_data(rx_data), .data(rx_byte), .have_data(char_ok)
  );

  selector_input u_sel_in (.clk, .rst, .sw(sw_sel), .mode);

  selector_modulator #(.SYMBOL_CLKS(CARRIER_CLKS)) u_selector (
    .clk, .rst, .mode, .char_in(rx_byte), .char_ok,
    .bpsk_valid(bpsk_v_in), .bpsk_sym,
    .qpsk_valid(qpsk_v_in), .qpsk_sym,
    .qam_valid(qam_v_in),   .qam_sym,
    .bit_pos
  );

  bpsk_modulator #(.PERIOD(CARRIER_CLKS), .AMPLITUDE(AMPLITUDE)) u_bpsk (
    .clk, .rst, .valid_in(bpsk_v_in), .data_in(bpsk_sym),
    .inphase_out(bpsk_i), .valid_out(bpsk_v)
  );

  qpsk_modulator #(.PERIOD(CARRIER_CLKS), .AMPLITUDE(AMPLITUDE)) u_qpsk (
    .clk, .rst, .valid_in(qpsk_v_in), .data_in(qpsk_sym),
    .inphase_out(qpsk_i), .quadrature_out(qpsk_q), .valid_out(qpsk_v)
  );

  qam16_modulator #(.PERIOD(CARRIER_CLKS), .AMPLITUDE(AMPLITUDE)) u_qam16 (
    .clk, .rst, .valid_in(qam_v_in), .data_in(qam_sym),
    .inphase_out(qam_i), .quadrature_out(qam_q), .valid_out(qam_v)
  );

  modulator_output u_out (
    .clk, .rst, .mode,
    .bpsk_i, .bpsk_v, .qpsk_i, .qpsk_q, .qpsk_v, .qam_i, .qam_q, .qam_v,
    .inphase_out, .quadrature_out, .out_valid
  );

endmodule
