// tb_cavity_model: one cavity with its Lorentz-force modes.
// 1. Random drive and coefficients (including mechanical modes), compared
//    every step with a 128-bit integer model of the same Euler update.
// 2. On resonance the step response must reach 1 - 1/e of the drive after
//    2^24/c_bw steps and settle at (c_in/c_bw) * I.
// 3. With detuning d = c_bw the steady state must be rotated by +45 degrees
//    and reduced by 1/sqrt(2): (I/2, I/2) for a drive I on the real axis.
// 4. With a mode and field, the total detuning must move (Lorentz force).
`timescale 1ns/1ps
module tb_cavity_model;
  import llrf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en;
  logic signed [15:0] ir, ii, v_i, v_q;
  cav_coef_t coef;
  logic signed [31:0] detune;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cavity_model dut (.clk, .rst, .en, .ir, .ii, .coef, .v_i, .v_q, .detune);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [127:0] w_t;
  w_t vr = 0, vi = 0;
  w_t mx[N_MODES], my[N_MODES];

  function automatic w_t clampw(input w_t v, input int bits);
    w_t mx_, mn_;
    mx_ = (w_t'(1) <<< (bits - 1)) - 1;
    mn_ = -(w_t'(1) <<< (bits - 1));
    if (v > mx_) return mx_;
    if (v < mn_) return mn_;
    return v;
  endfunction

  task automatic model_reset();
    vr = 0; vi = 0;
    for (int m = 0; m < N_MODES; m++) begin mx[m] = 0; my[m] = 0; end
  endtask

  task automatic model_step();
    w_t d, hr, hi, vsq, ar, ai, half, ny;
    hr = vr >>> 16; hi = vi >>> 16;
    vsq = hr * hr + hi * hi;
    d = w_t'(coef.d0);
    for (int m = 0; m < N_MODES; m++) d += (mx[m] >>> 16);
    ar = -w_t'(coef.c_bw) * vr - d * vi + w_t'(coef.c_in) * (w_t'(ir) <<< 16);
    ai =  d * vr - w_t'(coef.c_bw) * vi + w_t'(coef.c_in) * (w_t'(ii) <<< 16);
    vr = clampw(vr + (ar >>> 24), 32);
    vi = clampw(vi + (ai >>> 24), 32);
    half = w_t'(1) <<< 39;
    for (int m = 0; m < N_MODES; m++) begin
      ny = my[m] - w_t'(coef.mode[m].ka) * mx[m] - ((w_t'(coef.mode[m].kb) * my[m] + half) >>> 40)
           - w_t'(coef.mode[m].kc) * vsq;
      mx[m] = clampw(mx[m] + ((my[m] + half) >>> 40), 48);
      my[m] = clampw(ny, 64);
    end
  endtask

  task automatic restart();
    @(negedge clk); rst = 1;
    @(negedge clk); rst = 0;
    model_reset();
  endtask

  initial begin
    int tau_v;
    en = 0; ir = 0; ii = 0; coef = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    model_reset();
    // 1. bit-exact
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n % 2000 == 0) begin
        coef.c_bw = 18'($urandom_range(100, 60000));
        coef.c_in = 18'($urandom_range(100, 60000));
        coef.d0   = 24'($signed($urandom_range(0, 60000)) - 30000);
        for (int m = 0; m < N_MODES; m++) begin
          coef.mode[m].ka = 25'($urandom_range(0, 1000000));
          coef.mode[m].kb = 25'($urandom_range(0, 10000000));
          coef.mode[m].kc = 25'($signed($urandom_range(0, 2000)) - 1000);
        end
      end
      if (n % 100 == 0) begin ir = 16'($urandom); ii = 16'($urandom); end
      en = ($urandom_range(0, 7) != 0);
      if (en) model_step();
      @(posedge clk); #1;
      check(w_t'(v_i) == (vr >>> 16) && w_t'(v_q) == (vi >>> 16),
            $sformatf("step %0d: (%0d,%0d) want (%0d,%0d)", n, v_i, v_q, vr >>> 16, vi >>> 16));
    end
    // 2. resonance step response, tau = 2^24 / 2^16 = 256 steps
    restart();
    coef = '0; coef.c_bw = 18'sd65536; coef.c_in = 18'sd65536; en = 1; ir = 16'sd10000; ii = 0;
    repeat (256) @(posedge clk);
    #1 tau_v = int'(v_i);
    check(tau_v > 6300 && tau_v < 6350, $sformatf("after one time constant %0d want about 6321", tau_v));
    repeat (8000) @(posedge clk);
    #1 check(v_i >= 9998 && v_i <= 10000 && v_q == 0, $sformatf("settled to (%0d,%0d)", v_i, v_q));
    // 3. detuned by one half bandwidth: 45 degrees
    restart();
    coef.d0 = 24'sd65536;
    repeat (10000) @(posedge clk);
    #1 check(v_i >= 4990 && v_i <= 5010 && v_q >= 4990 && v_q <= 5010,
             $sformatf("detuned steady state (%0d,%0d) want (5000,5000)", v_i, v_q));
    // 4. Lorentz force moves the detuning
    restart();
    coef.d0 = 0; coef.mode[0].ka = 25'sd1048576; coef.mode[0].kb = 25'sd1000000; coef.mode[0].kc = 25'sd1048576;
    // static detuning -kc*vsq/ka/2^16 = -1e8/2^16, about -1526; the lightly damped
    // mode swings around it
    tau_v = 0;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      if (int'(detune) < tau_v) tau_v = int'(detune);
    end
    check(tau_v < -1526 && tau_v > -3300, $sformatf("Lorentz detuning swing reached %0d", tau_v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
