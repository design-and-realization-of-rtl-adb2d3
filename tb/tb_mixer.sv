// tb_mixer: self-checking testbench for mixer.
// Applies the corner products of the design (+/-1 and +/-3 times the carrier peak) and
// random 16-bit operands, and checks after one clock that the output is
// floor(coord * carrier / 1024) kept to 16 bits.
module tb_mixer;
  logic clk = 0, rst = 1;
  logic signed [15:0] coord = 0, carrier = 0, product;
  int checks = 0, failures = 0;

  mixer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int a, int b);
    longint p;
    logic signed [15:0] e;
    coord = 16'(a); carrier = 16'(b);
    p = longint'(coord) * longint'(carrier);
    e = 16'(p >>> 10);
    @(posedge clk); #1;
    checks++;
    if (product !== e) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", coord, carrier, product, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    apply(1024, 8192);  apply(-1024, 8192); apply(3072, 8192); apply(-3072, -8192);
    apply(3072, -8192); apply(1024, -1);    apply(-1024, 1);   apply(0, 8192);
    checks++;
    if (product != 0) failures++;
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0) apply(int'($urandom_range(6143)) - 3072, int'($urandom_range(16384)) - 8192);
      else            apply(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
