// tb_lpf_average: random input stream; each output must be the floor of the
// mean of the last four inputs (zeros before the first). Also checks that a
// step settles after exactly four samples.
`timescale 1ns/1ps
module tb_lpf_average;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [18:0] din, dout;
  int checks = 0, failures = 0;
  int hist[4];

  always #5 clk = ~clk;

  lpf_average #(.W(19), .LOG2_LEN(2)) dut (.clk, .rst, .din, .dout);

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
    int s, exp;
    din = 0;
    hist = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (n < 300) din = 19'($signed($urandom_range(0, 524287)) - 262144);
      else         din = (n < 450) ? 19'sd100000 : -19'sd7;
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = int'(din);
      s = hist[0] + hist[1] + hist[2] + hist[3];
      exp = s >>> 2;
      @(posedge clk); #1;
      check(int'(dout) == exp, $sformatf("n=%0d avg %0d want %0d", n, dout, exp));
      if (n == 303) check(dout == 19'sd100000, "step settled after four samples");
      if (n == 302) check(dout != 19'sd100000, "step not settled after three samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
