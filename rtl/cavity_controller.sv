// cavity_controller: digital LLRF cavity controller (vector-sum PI + FF).
//
// Eight IF inputs (10 MHz, sampled at 40 MHz by 14-bit ADCs) are each
// demodulated to base-band I/Q, corrected for loop gain and loop phase by a
// vector rotation, and summed to the vector sum of all cavities. The sum is
// low-pass filtered and regulated by PI feedback against a time-dependent set
// point, with a feed-forward waveform added to cancel the error that repeats
// from pulse to pulse. The resulting control vector drives two 14-bit DACs
// (I and Q) that modulate the RF fed to the cavities. A sampled trigger input
// starts each RF pulse and the global timing steps the set-point and
// feed-forward tables through it.
//
// This data path and its order follow the system's block diagram. This
// design's own choices: the host register map (see ctrl_setting_register),
// the channel enable mask, the 16-bit internal word, the output multiplexer
// choosing between the control vector and zero (dac_en), and taking the upper
// 14 bits of the control word for the DAC.
//
// Interface: adc[c] is the sample of channel c, trig_adc the trigger sample,
// host the register write bundle; dac_i/dac_q the DAC codes; vs_i/vs_q and
// enag are monitors.
// Timing: 6 cycles (150 ns at 40 MHz) from an ADC sample to the DAC code it
// affects: demodulator, rotation, sum, average, PI and output register.
`timescale 1ns/1ps
module cavity_controller
  import llrf_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst,
  input  logic signed [N_CH-1:0][ADC_W-1:0] adc,
  input  logic signed [ADC_W-1:0]          trig_adc,
  input  host_wr_t                         host,
  output logic signed [DAC_W-1:0]          dac_i,
  output logic signed [DAC_W-1:0]          dac_q,
  output logic signed [VS_W-1:0]           vs_i,
  output logic signed [VS_W-1:0]           vs_q,
  output logic                             enag,
  output logic [1:0]                       sat
);
  ctrl_cfg_t cfg;
  tbl_wr_t   tbl;
  logic [1:0] phase;
  logic signed [N_CH-1:0][IQ_W-1:0] dem_i, dem_q, rot_i, rot_q;
  logic signed [VS_W-1:0] sum_i, sum_q;
  logic [TBL_AW-1:0] addr_r;
  logic tick;
  logic signed [IQ_W-1:0] ctrl_i, ctrl_q;

  ctrl_setting_register u_regs (.clk, .rst, .host, .cfg, .tbl);

  if_phase_counter u_cnt (.clk, .rst, .phase);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    iq_demodulator #(.IN_W(ADC_W), .OUT_W(IQ_W)) u_dem (
      .clk, .rst, .phase, .if_in(adc[c]), .i_out(dem_i[c]), .q_out(dem_q[c]));
    vector_rotation #(.W(IQ_W)) u_rot (
      .clk, .rst, .i_in(dem_i[c]), .q_in(dem_q[c]),
      .gcos(cfg.gcos[c]), .gsin(cfg.gsin[c]), .i_out(rot_i[c]), .q_out(rot_q[c]));
  end

  vector_sum #(.N(N_CH), .W(IQ_W)) u_sum_i (.clk, .rst, .ch_en(cfg.ch_en), .din(rot_i), .sum(sum_i));
  vector_sum #(.N(N_CH), .W(IQ_W)) u_sum_q (.clk, .rst, .ch_en(cfg.ch_en), .din(rot_q), .sum(sum_q));

  lpf_average #(.W(VS_W)) u_lpf_i (.clk, .rst, .din(sum_i), .dout(vs_i));
  lpf_average #(.W(VS_W)) u_lpf_q (.clk, .rst, .din(sum_q), .dout(vs_q));

  global_timing #(.TICK(TICK_CYCLES), .DEPTH(TBL_DEPTH), .IN_W(ADC_W)) u_timing (
    .clk, .rst, .trig_in(trig_adc), .pulse_len(cfg.pulse_len), .addr_r, .enag, .tick);

  fb_ff #(.DEPTH(TBL_DEPTH)) u_fbff (
    .clk, .rst, .vs_i, .vs_q,
    .addr_w(tbl.addr), .data_w(tbl.data), .en_sp(tbl.en_sp), .en_ffi(tbl.en_ffi), .en_ffq(tbl.en_ffq),
    .addr_r, .enag, .fb_en(cfg.fb_en), .ff_en(cfg.ff_en), .kp(cfg.kp), .ki(cfg.ki),
    .ctrl_i, .ctrl_q, .sat);

  // Output multiplexer and DAC format: control vector or zero
  always_ff @(posedge clk) begin
    if (rst) begin
      dac_i <= '0;
      dac_q <= '0;
    end else begin
      dac_i <= cfg.dac_en ? ctrl_i[IQ_W-1 -: DAC_W] : '0;
      dac_q <= cfg.dac_en ? ctrl_q[IQ_W-1 -: DAC_W] : '0;
    end
  end
endmodule
