// tb_stf_llrf_system: closed-loop pulse test of controller and simulator.
//
// The controller's I/Q DACs are wired to the simulator's ADCs and the
// simulator's IF DACs to the controller's ADCs, as in the closed-loop test
// setup. Four cavities are simulated and controlled, with a half bandwidth of
// 217 Hz (c_bw = 572 at 40 MHz), two Lorentz-force modes (250 Hz, Q 50 and
// 450 Hz, Q 100) detuning each cavity by some -150 Hz at the flat-top field,
// and a beam that loads the cavities during the flat top. One RF pulse is
// 1.5 ms: a 500 us fill following the exponential set-point curve, then a
// flat top of 12000 per cavity (48000 for the vector sum). Feed-forward holds
// the fill drive, the flat-top drive and the beam compensation.
//
// Pulse 1 runs PI feedback plus feed-forward: over the flat top (outside
// 30 us after each beam edge) the vector sum of the cavity voltages must stay
// within 0.3 % in amplitude and 0.3 degrees in phase of the set point. The
// cavities then decay with the drive off. Pulse 2 runs feed-forward only and
// must show a larger error, which the detuning causes. Pulse 3 runs feedback
// only against a step set point, so the PI output has to supply the fill
// drive and clips at full scale; the flat top must still hold within 1 %. Counted and required:
// pulse triggers, table writes, loop-phase rotation, clipped PI outputs,
// Lorentz detuning, beam-loaded cycles, the three control modes,
// zero drive after each pulse, and the simulator recorder feed (trigger
// windows and flat-top words of cavity 0). All parameters are at their defaults.
`timescale 1ns/1ps
module tb_stf_llrf_system;
  import llrf_pkg::*;
  localparam real TAU_US = 733.0;     // 2^24 / 572 steps of 25 ns
  localparam int  V_FT   = 12000;     // flat-top voltage per cavity
  localparam int  N_ACT  = 4;         // cavities under control
  localparam int  CYC_US = TICK_CYCLES;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [N_CH-1:0][ADC_W-1:0] ctrl_adc;
  logic signed [ADC_W-1:0] ctrl_trig_adc;
  host_wr_t ctrl_host, sim_host;
  logic signed [DAC_W-1:0] ctrl_dac_i, ctrl_dac_q;
  logic signed [VS_W-1:0] ctrl_vs_i, ctrl_vs_q;
  logic ctrl_enag;
  logic [1:0] ctrl_sat;
  logic sim_beam_on;
  logic signed [N_CH-1:0][DAC_W-1:0] sim_dac_if;
  logic signed [N_CH-1:0][IQ_W-1:0] sim_mon_i, sim_mon_q;
  logic signed [N_CH-1:0][31:0] sim_mon_detune;
  logic signed [ADC_W-1:0] sim_rec_trig_adc;
  logic signed [N_REC-1:0][IQ_W-1:0] sim_rec_ch;
  logic sim_rec_valid, sim_rec_trig;
  int n_rec = 0, n_rec_trig = 0, n_rec_ft = 0;

  int checks = 0, failures = 0;
  int n_trig = 0, n_tbl = 0, n_rot = 0, n_sat = 0, n_lfd = 0, n_beam = 0, n_fb = 0, n_ffonly = 0, n_fbonly = 0, n_off = 0;

  always #12.5 clk = ~clk;      // 40 MHz

  stf_llrf_system dut (
    .clk, .rst, .ctrl_adc, .ctrl_trig_adc, .ctrl_host, .ctrl_dac_i, .ctrl_dac_q,
    .ctrl_vs_i, .ctrl_vs_q, .ctrl_enag, .ctrl_sat,
    .sim_adc_i(ctrl_dac_i), .sim_adc_q(ctrl_dac_q), .sim_beam_on, .sim_host,
    .sim_dac_if, .sim_mon_i, .sim_mon_q, .sim_mon_detune,
    .sim_rec_trig_adc, .sim_rec_ch, .sim_rec_valid, .sim_rec_trig);

  // the pulse trigger also starts the simulator's waveform record
  assign sim_rec_trig_adc = 14'(2 * int'(ctrl_trig_adc));

  // the simulator's IF DACs feed the controller's ADCs
  assign ctrl_adc = sim_dac_if;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic cwr(input int a, input int d);
    @(negedge clk); ctrl_host.we = 1; ctrl_host.addr = 8'(a); ctrl_host.data = 32'(d);
    @(negedge clk); ctrl_host.we = 0;
  endtask
  task automatic swr(input int a, input int d);
    @(negedge clk); sim_host.we = 1; sim_host.addr = 8'(a); sim_host.data = 32'(d);
    @(negedge clk); sim_host.we = 0;
  endtask

  // The modes ring for tens of ms and real pulses come 200 ms apart; to keep
  // the run short the damping is raised to its maximum between pulses.
  task automatic ring_down();
    for (int c = 0; c < N_ACT; c++) begin swr(16 + 16 * c + 4, 16777215); swr(16 + 16 * c + 7, 16777215); end
    repeat (400000) @(posedge clk);
    for (int c = 0; c < N_ACT; c++) begin swr(16 + 16 * c + 4, 863000); swr(16 + 16 * c + 7, 777000); end
  endtask

  function automatic int sp_i(input int a);   // per-cavity set point / 2 (see fb_ff)
    if (a < 500) return int'(real'(V_FT) / 2.0 * (1.0 - $exp(-real'(a) / TAU_US)) / (1.0 - $exp(-500.0 / TAU_US)));
    return V_FT / 2;
  endfunction
  function automatic int ff_i(input int a);
    int d;
    if (a < 500) d = int'(real'(V_FT) / (1.0 - $exp(-500.0 / TAU_US)));
    else d = V_FT;
    if (a >= 600 && a < 1400) d += 3600;     // beam compensation
    return d;
  endfunction

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) begin
    if (ctrl_sat != 0) n_sat++;
    if (sim_beam_on) n_beam++;
    if (!rst && sim_rec_valid) begin
      n_rec++;
      if (sim_rec_trig) n_rec_trig++;
      if (ctrl_enag && int'($signed(sim_rec_ch[0])) > V_FT * 9 / 10) n_rec_ft++;
    end
    if (ctrl_host.we && ctrl_host.addr inside {8'h06, 8'h07, 8'h08}) n_tbl++;
  end

  // One pulse; returns worst flat-top amplitude (%) and phase (deg) errors
  task automatic pulse(output real amp_err, output real ph_err);
    int t;
    real si, sq, a, p, a_set;
    amp_err = 0.0; ph_err = 0.0; a_set = real'(N_ACT * V_FT);
    @(negedge clk); ctrl_trig_adc = 14'sd4000;
    wait (ctrl_enag);
    n_trig++;
    @(negedge clk); ctrl_trig_adc = 0;
    t = 0;
    while (ctrl_enag) begin
      @(negedge clk);
      t++;
      sim_beam_on = (t >= 600 * CYC_US) && (t < 1400 * CYC_US);
      if (t > 600 * CYC_US && t % 10 == 0 &&
          !(t >= 600 * CYC_US && t < 630 * CYC_US) && !(t >= 1400 * CYC_US && t < 1430 * CYC_US) &&
          t < 1495 * CYC_US) begin
        si = 0.0; sq = 0.0;
        for (int c = 0; c < N_ACT; c++) begin
          si += real'($signed(sim_mon_i[c]));
          sq += real'($signed(sim_mon_q[c]));
        end
        a = $sqrt(si * si + sq * sq);
        p = 180.0 / 3.14159265358979 * $atan2(sq, si);
        a = (a > a_set ? a - a_set : a_set - a) / a_set * 100.0;
        if (p < 0.0) p = -p;
        if (a > amp_err) amp_err = a;
        if (p > ph_err) ph_err = p;
      end
      if (t == 1000 * CYC_US)
        for (int c = 0; c < N_ACT; c++) if (int'($signed(sim_mon_detune[c])) < -100) n_lfd++;
    end
    sim_beam_on = 0;
    check(t >= 1500 * CYC_US - 2 && t <= 1500 * CYC_US + 2, $sformatf("gate lasted %0d cycles", t));
    repeat (20) @(posedge clk);
    #1 check(ctrl_dac_i == 0 && ctrl_dac_q == 0, "drive off after the pulse");
    if (ctrl_dac_i == 0 && ctrl_dac_q == 0) n_off++;
  endtask

  initial begin
    real ae1, pe1, ae2, pe2, ae3, pe3;
    ctrl_host = '0; sim_host = '0; ctrl_trig_adc = 0; sim_beam_on = 0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    // --- simulator: four cavities
    swr(8'h02, -3600); swr(8'h03, 0);          // beam current
    swr(8'h04, 8'h0f);
    for (int c = 0; c < N_ACT; c++) begin
      swr(16 + 16 * c + 0, 572);               // w_1/2 dt 2^24, f_1/2 = 217 Hz
      swr(16 + 16 * c + 1, 572);
      swr(16 + 16 * c + 2, 20 * c - 30);       // a few Hz of static detuning
      swr(16 + 16 * c + 3, 1695);              // mode 0: 250 Hz
      swr(16 + 16 * c + 4, 863000);            //         Q 50
      swr(16 + 16 * c + 5, 250 + 20 * c);      //         Lorentz drive
      swr(16 + 16 * c + 6, 5493);              // mode 1: 450 Hz
      swr(16 + 16 * c + 7, 777000);            //         Q 100
      swr(16 + 16 * c + 8, 400);
    end
    // --- controller
    cwr(8'h04, 8'h0f);                          // four channels in the vector sum
    for (int c = 0; c < N_CH; c++) begin        // loop phase: the link turns I/Q by -90 degrees
      cwr(8'h10 + 2 * c, 0);
      cwr(8'h11 + 2 * c, 65536);
      n_rot++;
    end
    cwr(8'h01, 100000);                         // Kp = 24.4
    cwr(8'h02, 20000);                          // Ki
    cwr(8'h05, 0);
    for (int a = 0; a < 1500; a++) cwr(8'h06, {16'd0, 16'(sp_i(a))});
    cwr(8'h05, 0);
    for (int a = 0; a < 1500; a++) cwr(8'h07, ff_i(a));
    cwr(8'h05, 0);
    for (int a = 0; a < 1500; a++) cwr(8'h08, 0);
    // --- pulse 1: feedback and feed-forward
    cwr(8'h00, 7);
    pulse(ae1, pe1);
    n_fb++;
    $display("feedback pulse: amplitude error %.3f %%, phase error %.3f deg", ae1, pe1);
    check(ae1 < 0.3, $sformatf("flat-top amplitude error %.3f %% within 0.3 %%", ae1));
    check(pe1 < 0.3, $sformatf("flat-top phase error %.3f deg within 0.3 deg", pe1));
    // --- decay, then pulse 2: feed-forward only
    ring_down();
    cwr(8'h00, 6);
    pulse(ae2, pe2);
    n_ffonly++;
    $display("feed-forward-only pulse: amplitude error %.3f %%, phase error %.3f deg", ae2, pe2);
    check(ae2 > ae1 && pe2 > pe1, "feedback reduces the flat-top error");
    // --- pulse 3: feedback only with a step set point; the PI must supply the
    // fill drive alone and clips at full scale until the field catches up
    ring_down();
    cwr(8'h05, 0);
    for (int a = 0; a < 1500; a++) cwr(8'h06, {16'd0, 16'(V_FT / 2)});
    cwr(8'h00, 5);
    pulse(ae3, pe3);
    n_fbonly++;
    $display("feedback-only pulse: amplitude error %.3f %%, phase error %.3f deg", ae3, pe3);
    check(ae3 < 1.0 && pe3 < 1.0, "feedback alone holds the flat top within 1 %% and 1 deg");
    // --- every mechanism must have happened
    $display("recorder word sets %0d, trigger windows %0d, flat-top words of cavity 0 %0d",
             n_rec, n_rec_trig, n_rec_ft);
    $display("triggers %0d table writes %0d rotations %0d clipped %0d detuned %0d beam cycles %0d fb %0d ff-only %0d off %0d",
             n_trig, n_tbl, n_rot, n_sat, n_lfd, n_beam, n_fb, n_ffonly, n_off);
    check(n_trig == 3, "pulse triggers");
    check(n_tbl == 6000, "table writes");
    check(n_rot > 0, "loop-phase rotation");
    check(n_sat > 0, "clipped PI output");
    check(n_lfd > 0, "Lorentz-force detuning");
    check(n_beam > 0, "beam loading");
    check(n_fb > 0 && n_ffonly > 0 && n_fbonly > 0, "feedback, feed-forward-only and feedback-only modes");
    check(n_off == 3, "drive off after pulses");
    check(n_rec_trig == 3 && n_rec_ft > 2000, "waveform recorder feed triggered and recording the flat top");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
