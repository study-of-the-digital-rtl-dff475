// tb_global_timing: raises the sampled trigger above the level 32 (a level of
// exactly 32 must not trigger), then checks that the gate rises two cycles
// later, that the address steps every TICK cycles through 0..pulse_len-1,
// that the gate lasts exactly pulse_len*TICK cycles, and that a trigger
// during a pulse is ignored. Uses TICK = 4 to stay short.
`timescale 1ns/1ps
module tb_global_timing;
  localparam int TICK = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [13:0] trig_in;
  logic [10:0] pulse_len, addr_r;
  logic enag, tick;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  global_timing #(.TICK(TICK), .DEPTH(2048), .IN_W(14), .TRIG_LEVEL(32)) dut (
    .clk, .rst, .trig_in, .pulse_len, .addr_r, .enag, .tick);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int len, input bit retrig);
    int cyc_on, a_exp, ticks;
    @(negedge clk); pulse_len = 11'(len); trig_in = 14'sd32;
    repeat (5) @(negedge clk);
    check(!enag, "level equal to 32 does not trigger");
    trig_in = 14'sd1000;
    @(posedge clk); #1 check(!enag, "gate not yet high after one cycle");
    @(posedge clk); #1 check(enag, "gate high two cycles after trigger sample");
    check(addr_r == 0, "address starts at 0");
    cyc_on = 0; ticks = 0;
    while (enag) begin
      a_exp = cyc_on / TICK;
      check(int'(addr_r) == a_exp, $sformatf("address %0d want %0d", addr_r, a_exp));
      if (tick) ticks++;
      cyc_on++;
      if (retrig && cyc_on == 10) trig_in = 0;
      if (retrig && cyc_on == 13) trig_in = 14'sd1000;
      @(posedge clk); #1;
    end
    check(cyc_on == len * TICK, $sformatf("gate length %0d cycles want %0d", cyc_on, len * TICK));
    check(ticks == len, "one tick per address step");
    check(addr_r == 0, "address back to 0");
    @(negedge clk); trig_in = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    trig_in = 0; pulse_len = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    pulse(25, 0);
    pulse(7, 1);
    pulse(300, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
