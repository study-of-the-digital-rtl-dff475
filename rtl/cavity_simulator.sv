// cavity_simulator: real-time simulator of up to eight superconducting cavities.
//
// Stands in for real cavities so that the controller can be tested and
// operators trained without RF power. The I/Q drive coming from the
// controller's DACs is sampled by two ADCs, corrected for DC offset and
// summed with the beam-loading current (dc_offset_beam). Every cavity model
// integrates the electrical cavity equation with Lorentz-force detuning from
// its mechanical modes (cavity_model, mech_mode) using its own coefficients,
// and its base-band voltage is up-converted to 10 MHz IF samples
// (if_modulator) for one of eight DACs, from where it returns to the
// controller as the cavity probe signal. This structure follows the system's
// diagrams. This design's choices: all cavities share the one drive vector,
// the models step at the full 40 MHz rate, the beam gate is an input, and
// the base-band voltages of all cavities are also brought out as monitors.
// For the board's waveform recorder, record_feed decimates ten channels
// (I and Q of cavities 0-3, then the drive current I and Q) by 40 and adds a
// record trigger from a third ADC input; the memory controller is outside.
//
// Interface: adc_i/adc_q drive samples, rec_trig_adc trigger sample,
// beam_on, host register writes; dac_if[c] IF sample of cavity c,
// mon_i/mon_q base-band voltages, mon_detune, rec_ch/rec_valid/rec_trig.
// Timing: drive sample to state update 2 cycles, state to DAC 1 cycle,
// recorder words every 40 cycles.
`timescale 1ns/1ps
module cavity_simulator
  import llrf_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst,
  input  logic signed [ADC_W-1:0]           adc_i,
  input  logic signed [ADC_W-1:0]           adc_q,
  input  logic signed [ADC_W-1:0]           rec_trig_adc,
  input  logic                              beam_on,
  input  host_wr_t                          host,
  output logic signed [N_CH-1:0][DAC_W-1:0] dac_if,
  output logic signed [N_CH-1:0][IQ_W-1:0]  mon_i,
  output logic signed [N_CH-1:0][IQ_W-1:0]  mon_q,
  output logic signed [N_CH-1:0][31:0]      mon_detune,
  output logic signed [N_REC-1:0][IQ_W-1:0] rec_ch,
  output logic                              rec_valid,
  output logic                              rec_trig
);
  localparam int N_REC_CAV = (N_REC - 2) / 2;
  sim_cfg_t cfg;
  logic [1:0] phase;
  logic signed [IQ_W-1:0] cur_i, cur_q;

  sim_setting_register u_regs (.clk, .rst, .host, .cfg);

  if_phase_counter u_cnt (.clk, .rst, .phase);

  dc_offset_beam #(.IN_W(ADC_W), .W(IQ_W)) u_dcb (
    .clk, .rst, .in_i(adc_i), .in_q(adc_q), .off_i(cfg.off_i), .off_q(cfg.off_q),
    .beam_on, .ib_i(cfg.ib_i), .ib_q(cfg.ib_q), .out_i(cur_i), .out_q(cur_q));

  for (genvar c = 0; c < N_CH; c++) begin : g_cav
    cavity_model u_cav (
      .clk, .rst, .en(cfg.cav_en[c]), .ir(cur_i), .ii(cur_q), .coef(cfg.cav[c]),
      .v_i(mon_i[c]), .v_q(mon_q[c]), .detune(mon_detune[c]));
    if_modulator #(.W(IQ_W), .DAC_W(DAC_W)) u_if (
      .clk, .rst, .phase, .i_in(mon_i[c]), .q_in(mon_q[c]), .if_out(dac_if[c]));
  end

  logic signed [N_REC-1:0][IQ_W-1:0] rec_in;
  always_comb begin
    for (int c = 0; c < N_REC_CAV; c++) begin
      rec_in[2*c]   = mon_i[c];
      rec_in[2*c+1] = mon_q[c];
    end
    rec_in[N_REC-2] = cur_i;
    rec_in[N_REC-1] = cur_q;
  end

  record_feed #(.N(N_REC), .W(IQ_W), .DECIM(REC_DECIM), .IN_W(ADC_W)) u_rec (
    .clk, .rst, .ch(rec_in), .trig_adc(rec_trig_adc), .rec_ch, .rec_valid, .rec_trig);
endmodule
