// tb_if_phase_counter: checks that the IF sample counter starts at 0 after
// reset and counts 0,1,2,3,0,... every cycle, and restarts on reset.
`timescale 1ns/1ps
module tb_if_phase_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] phase;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  if_phase_counter dut (.clk, .rst, .phase);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    #1 check(phase == 2'd0, "phase 0 after reset");
    for (int n = 1; n < 40; n++) begin
      @(posedge clk); #1;
      check(phase == 2'(n % 4), $sformatf("phase at step %0d is %0d", n, phase));
    end
    rst <= 1'b1;
    @(posedge clk); #1 check(phase == 2'd0, "reset clears phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
