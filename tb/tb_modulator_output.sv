// tb_modulator_output: self-checking testbench for modulator_output.
// Drives random samples on all modulator inputs and random mode codes, and checks one
// clock later that the selected modulator's in-phase, quadrature and valid signals are
// on the outputs (quadrature 0 for BPSK, everything 0 for code 11).
module tb_modulator_output;
  import mod_pkg::*;
  logic clk = 0, rst = 1;
  mode_e mode = MODE_BPSK;
  logic signed [15:0] bpsk_i = 0, qpsk_i = 0, qpsk_q = 0, qam_i = 0, qam_q = 0;
  logic bpsk_v = 0, qpsk_v = 0, qam_v = 0;
  logic signed [15:0] inphase_out, quadrature_out;
  logic out_valid;
  int checks = 0, failures = 0;

  modulator_output dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] ei, eq;
    logic ev;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      mode = mode_e'((n < 4) ? n : int'($urandom_range(3)));
      bpsk_i = 16'($urandom); qpsk_i = 16'($urandom); qpsk_q = 16'($urandom);
      qam_i = 16'($urandom);  qam_q = 16'($urandom);
      {bpsk_v, qpsk_v, qam_v} = 3'($urandom);
      case (int'(mode))
        0: begin ei = bpsk_i; eq = 0;      ev = bpsk_v; end
        1: begin ei = qpsk_i; eq = qpsk_q; ev = qpsk_v; end
        2: begin ei = qam_i;  eq = qam_q;  ev = qam_v;  end
        default: begin ei = 0; eq = 0; ev = 0; end
      endcase
      @(posedge clk); #1;
      checks++;
      if (inphase_out != ei || quadrature_out != eq || out_valid != ev) begin
        failures++;
        $display("FAIL mode %0d: got %0d %0d %0b expected %0d %0d %0b", mode, inphase_out, quadrature_out, out_valid, ei, eq, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
