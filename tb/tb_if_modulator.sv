// tb_if_modulator: random base-band vectors; over one IF period the output
// must be I, -Q, -I, Q (upper 14 bits of the 16-bit input), each one cycle
// after its phase, and the most negative code must clip, not wrap.
`timescale 1ns/1ps
module tb_if_modulator;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] phase;
  logic signed [15:0] i_in, q_in;
  logic signed [13:0] if_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  if_modulator dut (.clk, .rst, .phase, .i_in, .q_in, .if_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vi, vq, e;
    phase = 0; i_in = 0; q_in = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 500; n++) begin
      i_in = 16'($urandom); q_in = 16'($urandom);
      if (n == 0) i_in = 16'sh8000;
      vi = int'(i_in) >>> 2; vq = int'(q_in) >>> 2;
      for (int p = 0; p < 4; p++) begin
        @(negedge clk); phase = 2'(p);
        case (p)
          0: e = vi;  1: e = -vq;  2: e = -vi;  default: e = vq;
        endcase
        if (e > 8191) e = 8191;
        @(posedge clk); #1;
        check(int'(if_out) == e, $sformatf("phase %0d: %0d want %0d", p, if_out, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
