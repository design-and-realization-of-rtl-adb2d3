// tb_uart_rx: self-checking testbench for uart_rx with 16 clocks per bit.
// Sends the characters 'a', 'm', 'v' and random bytes as 8N1 frames, least significant
// bit first, and checks each received byte and that `valid` is a single pulse arriving
// within the stop bit. Also sends a frame with a 0 stop bit (must be dropped) and a
// short low glitch on the idle line (must not start a frame).
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst = 1, rxd = 1, valid;
  logic [7:0] data;
  int checks = 0, failures = 0, pulses = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (valid && !rst) pulses++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t: data=%h", what, $time, data); end
  endtask

  // Send one frame; returns the number of valid pulses seen during it and the cycle
  // (counted from the start edge) of the last one.
  task automatic send(logic [7:0] b, logic stop, output int got, output int at);
    logic [9:0] frame;
    int p0;
    frame = {stop, b, 1'b0};
    p0 = pulses; at = -1;
    for (int i = 0; i < 10 * CPB + CPB; i++) begin
      rxd = (i < 10 * CPB) ? frame[i / CPB] : 1'b1;
      @(posedge clk); #1;
      if (valid) at = i;
    end
    got = pulses - p0;
  endtask

  initial begin
    int got, at;
    logic [7:0] b;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      case (n)
        0: b = "a";
        1: b = "m";
        2: b = "v";
        default: b = 8'($urandom);
      endcase
      send(b, 1'b1, got, at);
      check(got == 1, "one valid pulse per frame");
      check(data == b, $sformatf("byte %h received", b));
      check(at >= 9 * CPB && at < 10 * CPB + 4, $sformatf("valid within the stop bit (cycle %0d)", at));
      if (n == 10) begin
        send(8'hc3, 1'b0, got, at);
        check(got == 0 && data == b, "frame with bad stop bit dropped");
        repeat (3 * CPB) @(posedge clk);
        #1;
      end
      if (n == 20) begin
        rxd = 0; repeat (CPB / 4) @(posedge clk);
        #1 rxd = 1; repeat (2 * CPB) @(posedge clk);
        #1 check(pulses == n + 1, $sformatf("glitch ignored (%0d pulses)", pulses));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
