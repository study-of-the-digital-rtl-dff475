// tb_iq_demodulator: feeds IF sample streams built from random base-band
// vectors (samples I, -Q, -I, Q of each period) and checks that the block
// recovers I and Q, scaled by 4 to the 16-bit word, one cycle after the
// carrying sample. Includes the most negative ADC code.
`timescale 1ns/1ps
module tb_iq_demodulator;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] phase;
  logic signed [13:0] if_in;
  logic signed [15:0] i_out, q_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iq_demodulator dut (.clk, .rst, .phase, .if_in, .i_out, .q_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vi, vq, s;
    phase = 0; if_in = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 200; t++) begin
      vi = $urandom_range(0, 16382) - 8191;
      vq = $urandom_range(0, 16382) - 8191;
      if (t == 0) vi = -8192;
      if (t == 1) vq = 8191;
      for (int p = 0; p < 4; p++) begin
        case (p)
          0: s = vi;  1: s = -vq;  2: s = -vi;  default: s = vq;
        endcase
        if (s > 8191) s = 8191;
        @(negedge clk);
        phase = 2'(p);
        if_in = 14'(s);
        @(posedge clk); #1;
        if (p == 0) check(i_out == 16'(4 * vi), $sformatf("I on phase 0: %0d vs %0d", i_out, 4 * vi));
        if (p == 1) check(q_out == 16'(4 * vq), $sformatf("Q on phase 1: %0d vs %0d", q_out, 4 * vq));
        if (p == 2) begin
          int exp_i;
          exp_i = (vi == -8192) ? 32767 : 4 * vi;
          // -I sample of the most negative code is clipped to 8191 by the test
          if (vi == -8192) exp_i = -4 * 8191;
          check(i_out == 16'(exp_i), $sformatf("I on phase 2: %0d vs %0d", i_out, exp_i));
        end
        if (p == 3) check(q_out == 16'(4 * vq), $sformatf("Q on phase 3: %0d vs %0d", q_out, 4 * vq));
      end
    end
    // Most negative code on a negated phase saturates instead of wrapping
    @(negedge clk); phase = 2'd1; if_in = 14'sh2000;
    @(posedge clk); #1 check(q_out == 16'sh7fff, "negated minimum code saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
