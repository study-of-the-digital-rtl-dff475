// tb_cavity_controller: the whole controller with synthetic IF inputs.
//
// Each channel receives the IF samples (I, -Q, -I, Q) of a constant random
// vector, in step with the controller's sample counter. The host loads a
// set point and a ramp of feed-forward values, sets Kp = 1 and a 20 us pulse,
// and raises the trigger. For every table step the DAC codes must equal the
// upper 14 bits of 8*SP - VS + FF, where VS is the sum of 4*I (or 4*Q) of
// the enabled channels. Also checked: the channel mask, a 90 degree
// rotation of one channel, the DAC held at zero when dac_en is clear, the gate
// length and the ADC-to-DAC latency of 6 clock edges (150 ns at 40 MHz).
`timescale 1ns/1ps
module tb_cavity_controller;
  import llrf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [N_CH-1:0][ADC_W-1:0] adc;
  logic signed [ADC_W-1:0] trig_adc;
  host_wr_t host;
  logic signed [DAC_W-1:0] dac_i, dac_q;
  logic signed [VS_W-1:0] vs_i, vs_q;
  logic enag;
  logic [1:0] sat;
  int checks = 0, failures = 0;
  int vi[N_CH], vq[N_CH];
  logic [1:0] ph;

  always #5 clk = ~clk;

  cavity_controller dut (.clk, .rst, .adc, .trig_adc, .host, .dac_i, .dac_q, .vs_i, .vs_q, .enag, .sat);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always_ff @(posedge clk) ph <= rst ? 2'd0 : ph + 2'd1;
  always_comb
    for (int c = 0; c < N_CH; c++)
      case (ph)
        2'd0: adc[c] = ADC_W'(vi[c]);
        2'd1: adc[c] = ADC_W'(-vq[c]);
        2'd2: adc[c] = ADC_W'(-vi[c]);
        default: adc[c] = ADC_W'(vq[c]);
      endcase

  task automatic wr(input int a, input int d);
    @(negedge clk); host.we = 1; host.addr = 8'(a); host.data = 32'(d);
    @(negedge clk); host.we = 0;
  endtask

  function automatic int sp_i(input int a); return 2000; endfunction
  function automatic int sp_q(input int a); return -1000; endfunction
  function automatic int ff_i(input int a); return 100 * a; endfunction
  function automatic int ff_q(input int a); return -50 * a; endfunction

  task automatic run_pulse(input logic [7:0] mask, input int rot_ch, input bit dac_on);
    int ei, eq, si, sq, steps, ri, rq;
    si = 0; sq = 0;
    for (int c = 0; c < N_CH; c++) if (mask[c]) begin
      ri = vi[c]; rq = vq[c];
      if (c == rot_ch) begin ri = -vq[c]; rq = vi[c]; end
      si += 4 * ri; sq += 4 * rq;
    end
    @(negedge clk); trig_adc = 14'sd2000;
    wait (enag);
    steps = 0;
    while (enag) begin
      repeat (30) @(posedge clk);
      #1;
      ei = 8 * sp_i(steps) - si + ff_i(steps);
      eq = 8 * sp_q(steps) - sq + ff_q(steps);
      if (!dac_on) begin ei = 0; eq = 0; end
      check(int'(dac_i) == (ei >>> 2) && int'(dac_q) == (eq >>> 2),
            $sformatf("step %0d: dac (%0d,%0d) want (%0d,%0d)", steps, dac_i, dac_q, ei >>> 2, eq >>> 2));
      repeat (10) @(posedge clk);
      #1;
      steps++;
    end
    check(steps == 20, $sformatf("gate lasted %0d steps", steps));
    @(negedge clk); trig_adc = 0;
    repeat (10) @(posedge clk);
    check(dac_i == 0 && dac_q == 0, "output zero after the pulse");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, lat;
    host = '0; trig_adc = 0;
    for (int c = 0; c < N_CH; c++) begin
      vi[c] = $urandom_range(0, 1000) - 500;
      vq[c] = $urandom_range(0, 1000) - 500;
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wr(8'h01, 4096);        // Kp = 1.0
    wr(8'h02, 0);
    wr(8'h03, 20);          // 20 us pulse
    // one table at a time: the table address advances after every data write
    wr(8'h05, 0);
    for (int a = 0; a < 20; a++) wr(8'h06, {16'(sp_q(a)), 16'(sp_i(a))});
    wr(8'h05, 0);
    for (int a = 0; a < 20; a++) wr(8'h07, ff_i(a));
    wr(8'h05, 0);
    for (int a = 0; a < 20; a++) wr(8'h08, ff_q(a));
    wr(8'h00, 7);           // feedback, feed-forward, DAC on
    run_pulse(8'hff, -1, 1);
    wr(8'h04, 8'h0f);       // four channels, as in the closed-loop test
    run_pulse(8'h0f, -1, 1);
    wr(8'h12, 0); wr(8'h13, 65536);   // channel 1 rotated by +90 degrees
    run_pulse(8'h0f, 1, 1);
    wr(8'h00, 3);           // DAC off
    run_pulse(8'h0f, 1, 0);
    // Latency: P only, no FF; step the I of channel 0 on a phase-0 sample
    wr(8'h00, 5);
    @(negedge clk); trig_adc = 14'sd2000;
    wait (enag);
    repeat (100) @(posedge clk);
    while (ph != 2'd3) @(posedge clk);
    @(negedge clk);
    vi[0] = vi[0] + 400;      // next edge samples phase 0 with the new I
    t0 = 0; lat = -1;
    begin
      logic signed [DAC_W-1:0] d0;
      d0 = dac_i;
      for (int k = 1; k <= 20; k++) begin
        @(posedge clk); #1;
        if (lat < 0 && dac_i != d0) lat = k;
      end
    end
    check(lat == 6, $sformatf("ADC to DAC latency %0d clock edges", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
