// tb_uart_buffer: self-checking testbench for uart_buffer.
// Checks the empty state after reset, that a strobed byte is captured one clock later,
// that the byte is held while no strobe comes (whatever is on the data input) and that
// each new strobe replaces it.
module tb_uart_buffer;
  logic clk = 0, rst = 1, in_valid = 0, have_data;
  logic [7:0] in_data = 0, data;
  int checks = 0, failures = 0;

  uart_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s: data=%h have=%0b", what, data, have_data); end
  endtask

  initial begin
    logic [7:0] held;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(!have_data && data == 0, "empty after reset");
    in_data = 8'h5a;
    repeat (3) begin @(posedge clk); #1; end
    check(!have_data, "no capture without strobe");
    for (int i = 0; i < 200; i++) begin
      held = 8'($urandom);
      in_data = held; in_valid = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(have_data && data == held, "captured");
      repeat ($urandom_range(4)) begin
        in_data = 8'($urandom);
        @(posedge clk); #1;
        check(data == held, "held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
