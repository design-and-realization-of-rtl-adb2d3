// uart_rx: receiver for the 8-bit ASCII characters typed on the host computer.
//
// Frame: one start bit (0), eight data bits sent least significant bit first, one stop
// bit (1), no parity. The line first passes through a two-flip-flop synchronizer, since
// it comes from outside the clock domain. After a falling edge the receiver waits half a
// bit time and checks that the line is still low (else it treats the edge as a glitch),
// then samples each data bit and the stop bit in the middle of its bit time.
// A byte whose stop bit reads 0 is dropped (framing error) and the receiver waits for
// the line to return high.
//
// Interface: `data` holds the last good byte; `valid` is high for one clock when it
// changes, at the middle of the stop bit. CLKS_PER_BIT is clock cycles per bit; its
// default 868 gives 115200 baud from a 100 MHz clock (10 ns, the system clock). The
// document names only an 8-bit ASCII UART input; baud rate, frame format and the
// synchronizer are this design's choices.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_STOP, S_WAIT_HIGH} state_e;

  state_e          state;
  logic [1:0]      sync;
  logic [CW-1:0]   cnt;
  logic [2:0]      bit_idx;
  logic [7:0]      shreg;
  logic            rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx) state <= S_START;
        end
        S_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt     <= '0;
            bit_idx <= '0;
            state   <= rx ? S_IDLE : S_DATA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            if (bit_idx == 3'd7) state <= S_STOP;
            bit_idx <= bit_idx + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt <= '0;
            if (rx) begin
              data  <= shreg;
              valid <= 1'b1;
              state <= S_IDLE;
            end else begin
              state <= S_WAIT_HIGH;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin  // S_WAIT_HIGH: framing error, wait for an idle line
          if (rx) state <= S_IDLE;
        end
      endcase
    end
  end

  // A received byte is announced by a single-clock pulse.
  a_valid_pulse: assert property (@(posedge clk) disable iff (rst) valid |=> !valid);

endmodule
