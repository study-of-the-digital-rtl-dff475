// tb_pi_controller: drives random set points, measurements, feed-forward
// values, gains and mode bits, and compares every output with a cycle model
// written from the control law: ctrl = sat16(Kp*e/2^12 + Ki*acc/2^22 + FF),
// acc += e while feedback is on and the output is not clipped in the
// direction of e, everything cleared while run is low. Also checks a pure
// proportional case, an integrator ramp and a clipped output by hand numbers.
`timescale 1ns/1ps
module tb_pi_controller;
  logic clk = 1'b0, rst = 1'b1;
  logic run, fb_en, ff_en, sat;
  logic signed [18:0] setp, meas;
  logic signed [15:0] ff, ctrl;
  logic signed [17:0] kp, ki;
  int checks = 0, failures = 0;
  int n_sat = 0;

  always #5 clk = ~clk;

  pi_controller dut (.clk, .rst, .run, .fb_en, .ff_en, .setp, .meas, .ff, .kp, .ki, .ctrl, .sat);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference state
  longint m_acc = 0, m_ctrl = 0;
  bit     m_sat = 0;

  task automatic step_model();
    longint e, tot, o;
    bit s, hold;
    e = longint'(setp) - longint'(meas);
    tot = 0;
    if (fb_en) tot = ((longint'(kp) * e) >>> 12) + ((longint'(ki) * m_acc) >>> 22);
    if (ff_en) tot += longint'(ff);
    s = 0; o = tot;
    if (tot > 32767) begin o = 32767; s = 1; end
    if (tot < -32768) begin o = -32768; s = 1; end
    hold = m_sat && ((e < 0) == (m_ctrl < 0));
    if (!run) begin
      m_acc = 0; m_ctrl = 0; m_sat = 0;
    end else begin
      if (fb_en && !hold) begin
        m_acc += e;
        if (m_acc > 64'sh7f_ffff_ffff) m_acc = 64'sh7f_ffff_ffff;
        if (m_acc < -64'sh80_0000_0000) m_acc = -64'sh80_0000_0000;
      end
      m_ctrl = o; m_sat = s;
    end
  endtask

  task automatic cyc();
    step_model();
    @(posedge clk); #1;
    check(longint'(ctrl) == m_ctrl && sat == m_sat,
          $sformatf("ctrl %0d want %0d, sat %0d want %0d", ctrl, m_ctrl, sat, m_sat));
    if (sat) n_sat++;
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run = 0; fb_en = 0; ff_en = 0; setp = 0; meas = 0; ff = 0; kp = 0; ki = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    // Proportional only: Kp = 2.0, error 1000 -> 2000
    run = 1; fb_en = 1; kp = 18'sd8192; ki = 0; setp = 19'sd5000; meas = 19'sd4000;
    cyc();
    check(ctrl == 16'sd2000, "P gain 2 on error 1000");
    // Feed-forward added
    ff_en = 1; ff = 16'sd300;
    cyc();
    check(ctrl == 16'sd2300, "P plus FF");
    // Integrator: Kp = 0, Ki = 2^12 -> I term = acc / 2^10
    kp = 0; ki = 18'sd4096; ff_en = 0;
    for (int k = 0; k < 100; k++) cyc();
    // acc after these 100 cycles (plus the 2 before) = 102 * 1000 at the output's input
    check(ctrl == 16'(((101 * 1000)) >>> 10), $sformatf("integrator ramp %0d", ctrl));
    // run low clears
    run = 0; cyc();
    check(ctrl == 0, "gate off gives zero");
    // Saturation with large gain
    run = 1; kp = 18'sd131071; setp = 19'sd200000; meas = -19'sd200000;
    cyc();
    check(ctrl == 16'sh7fff && sat, "positive clip");
    // Random
    for (int k = 0; k < 3000; k++) begin
      if (k % 300 == 0) begin
        kp = 18'($urandom_range(0, 40000)); ki = 18'($urandom_range(0, 3000));
        fb_en = $urandom_range(0, 3) != 0; ff_en = $urandom_range(0, 1);
        run = $urandom_range(0, 7) != 0;
      end
      setp = 19'($signed($urandom_range(0, 400000)) - 200000);
      meas = setp + 19'($signed($urandom_range(0, 4000)) - 2000);
      ff = 16'($urandom);
      cyc();
    end
    check(n_sat > 0, "saturation occurred in the random run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
