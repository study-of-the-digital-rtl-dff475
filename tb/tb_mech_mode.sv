// tb_mech_mode: Lorentz-force mode integrator.
// 1. Default scaling: random coefficients and V^2 inputs, the state compared
//    every step with a 128-bit integer model of the Euler update.
// 2. A faster, damped mode (H = 36): under constant V^2 the detuning must
//    settle to the static value -kc*V^2/ka, and it must overshoot on the way
//    (an under-damped resonance), then return to zero when the drive stops.
`timescale 1ns/1ps
module tb_mech_mode;
  logic clk = 1'b0, rst = 1'b1;
  logic en;
  logic [31:0] vsq;
  logic signed [24:0] ka, kb, kc, ka2, kb2, kc2;
  logic signed [31:0] dw, dw2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mech_mode dut (.clk, .rst, .en, .vsq, .ka, .kb, .kc, .dw);
  mech_mode #(.H(36)) dut2 (.clk, .rst, .en, .vsq, .ka(ka2), .kb(kb2), .kc(kc2), .dw(dw2));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model: x with 16 fraction bits, y scaled by 2^40
  logic signed [127:0] mx = 0, my = 0;
  task automatic model_step();
    logic signed [127:0] ny, half;
    half = 128'sd1 <<< 39;
    ny = my - 128'(ka) * mx - ((128'(kb) * my + half) >>> 40) - 128'(kc) * $signed({96'd0, vsq});
    mx = mx + ((my + half) >>> 40);
    my = ny;
    if (mx > 128'sh7fff_ffff_ffff) mx = 128'sh7fff_ffff_ffff;
    if (mx < -128'sh8000_0000_0000) mx = -128'sh8000_0000_0000;
    if (my > 128'sh7fff_ffff_ffff_ffff) my = 128'sh7fff_ffff_ffff_ffff;
    if (my < -128'sh8000_0000_0000_0000) my = -128'sh8000_0000_0000_0000;
  endtask

  initial begin
    int peak;
    en = 0; vsq = 0; ka = 0; kb = 0; kc = 0; ka2 = 0; kb2 = 0; kc2 = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // 1. bit-exact against the model
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) begin
        ka = 25'($urandom_range(0, 2000000)); kb = 25'($urandom_range(0, 16000000));
        kc = 25'($signed($urandom_range(0, 2000000)) - 1000000);
      end
      vsq = $urandom_range(0, 32'h7fff_ffff);
      en = ($urandom_range(0, 3) != 0);
      if (en) model_step();
      @(posedge clk); #1;
      check(128'(dw) == (mx >>> 16), $sformatf("step %0d: dw %0d want %0d", n, dw, mx));
    end
    // 2. steady state of the damped mode: ka2 = 2^24, Q about 2
    @(negedge clk); rst = 1; en = 1;
    @(negedge clk); rst = 0;
    // 2 pi f dt = 2^-10, Q = 8 at H = 36: ka = 2^16, kb = 2^23
    ka2 = 25'sd65536; kb2 = 25'sd8388608; kc2 = -25'sd8388608; vsq = 32'd1 << 20;
    peak = 0;
    for (int n = 0; n < 200000; n++) begin
      @(posedge clk);
      if (int'(dw2) > peak) peak = int'(dw2);
    end
    #1;
    // static value 2^23 * 2^20 / 2^16 / 2^16 = 2048
    check(dw2 >= 2047 && dw2 <= 2048, $sformatf("static Lorentz detuning %0d want 2048", dw2));
    check(peak > 2100, $sformatf("under-damped overshoot, peak %0d", peak));
    @(negedge clk); vsq = 0;
    repeat (200000) @(posedge clk);
    #1 check(dw2 >= -1 && dw2 <= 0, $sformatf("relaxes to zero without field, %0d", dw2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
