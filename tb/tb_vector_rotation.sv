// tb_vector_rotation: random vectors and coefficients, compared with
// I' = (gc*I - gs*Q) >> 16 and Q' = (gs*I + gc*Q) >> 16 computed in 64-bit
// integers, plus a 90 degree rotation, unity gain and saturation cases.
`timescale 1ns/1ps
module tb_vector_rotation;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [15:0] i_in, q_in, i_out, q_out;
  logic signed [17:0] gcos, gsin;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_rotation dut (.clk, .rst, .i_in, .q_in, .gcos, .gsin, .i_out, .q_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic apply(input longint ii, qq, gc, gs);
    longint ei, eq;
    @(negedge clk);
    i_in = 16'(ii); q_in = 16'(qq); gcos = 18'(gc); gsin = 18'(gs);
    ei = sat16((gc * ii - gs * qq) >>> 16);
    eq = sat16((gs * ii + gc * qq) >>> 16);
    @(posedge clk); #1;
    check(longint'(i_out) == ei && longint'(q_out) == eq,
          $sformatf("rot(%0d,%0d) by (%0d,%0d): got (%0d,%0d) want (%0d,%0d)", ii, qq, gc, gs, i_out, q_out, ei, eq));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = 0; q_in = 0; gcos = 0; gsin = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    apply(1000, -2000, 65536, 0);          // unity
    check(i_out == 1000 && q_out == -2000, "unity gain leaves vector");
    apply(1000, -2000, 0, 65536);          // +90 degrees: (I,Q) -> (-Q, I)
    check(i_out == 2000 && q_out == 1000, "90 degree rotation");
    apply(30000, 30000, 131071, 0);        // gain near 2 saturates
    check(i_out == 32767 && q_out == 32767, "saturation");
    for (int n = 0; n < 500; n++)
      apply($signed($urandom_range(0, 65535)) - 32768, $signed($urandom_range(0, 65535)) - 32768,
            $signed($urandom_range(0, 262143)) - 131072, $signed($urandom_range(0, 262143)) - 131072);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
