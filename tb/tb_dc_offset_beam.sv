// tb_dc_offset_beam: random drive samples, offsets and beam currents, with
// the beam gate on and off; output must be 4*in - offset (+ beam), clipped to
// 16 bits, one cycle later.
`timescale 1ns/1ps
module tb_dc_offset_beam;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] in_i, in_q;
  logic signed [15:0] off_i, off_q, ib_i, ib_q, out_i, out_q;
  logic beam_on;
  int checks = 0, failures = 0, n_clip = 0;

  always #5 clk = ~clk;

  dc_offset_beam dut (.clk, .rst, .in_i, .in_q, .off_i, .off_q, .beam_on, .ib_i, .ib_q, .out_i, .out_q);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int clip(input int v, inout int n);
    if (v > 32767) begin n++; return 32767; end
    if (v < -32768) begin n++; return -32768; end
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ei, eq;
    in_i = 0; in_q = 0; off_i = 0; off_q = 0; ib_i = 0; ib_q = 0; beam_on = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_i = 14'($urandom); in_q = 14'($urandom);
      off_i = 16'($signed($urandom_range(0, 2000)) - 1000);
      off_q = 16'($signed($urandom_range(0, 2000)) - 1000);
      ib_i = 16'($urandom); ib_q = 16'($urandom);
      beam_on = $urandom_range(0, 1);
      ei = 4 * int'(in_i) - int'(off_i) + (beam_on ? int'(ib_i) : 0);
      eq = 4 * int'(in_q) - int'(off_q) + (beam_on ? int'(ib_q) : 0);
      ei = clip(ei, n_clip); eq = clip(eq, n_clip);
      @(posedge clk); #1;
      check(int'(out_i) == ei && int'(out_q) == eq, $sformatf("(%0d,%0d) want (%0d,%0d)", out_i, out_q, ei, eq));
    end
    check(n_clip > 0, "clipping exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
