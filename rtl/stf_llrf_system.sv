// stf_llrf_system: pulsed RF vector-sum control system with cavity simulator.
//
// Two FPGA designs that are used together: the cavity controller, which
// regulates the vector sum of up to eight superconducting cavities with PI
// feedback and feed-forward, and the real-time cavity simulator, which models
// eight cavities with Lorentz-force detuning so the controller can be tested
// in closed loop without real cavities. In the closed-loop setup the
// controller's two DACs (I and Q drive) feed the simulator's two ADCs, and the
// simulator's eight IF DACs feed the controller's eight ADCs. The converters
// and cables are analog, so those four links are ports of this module and
// are connected outside it (a testbench connects them directly). Each design
// keeps its own host register port, beam gate and trigger.
//
// The simulator also presents a decimated recorder feed (ten channels, one
// word set per microsecond, trigger from its own ADC input) for a board
// memory recorder, which is outside this design.
//
// Timing: see cavity_controller (6 cycles ADC to DAC) and cavity_simulator.
`timescale 1ns/1ps
module stf_llrf_system
  import llrf_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst,
  // cavity controller
  input  logic signed [N_CH-1:0][ADC_W-1:0] ctrl_adc,
  input  logic signed [ADC_W-1:0]           ctrl_trig_adc,
  input  host_wr_t                          ctrl_host,
  output logic signed [DAC_W-1:0]           ctrl_dac_i,
  output logic signed [DAC_W-1:0]           ctrl_dac_q,
  output logic signed [VS_W-1:0]            ctrl_vs_i,
  output logic signed [VS_W-1:0]            ctrl_vs_q,
  output logic                              ctrl_enag,
  output logic [1:0]                        ctrl_sat,
  // cavity simulator
  input  logic signed [ADC_W-1:0]           sim_adc_i,
  input  logic signed [ADC_W-1:0]           sim_adc_q,
  input  logic signed [ADC_W-1:0]           sim_rec_trig_adc,
  input  logic                              sim_beam_on,
  input  host_wr_t                          sim_host,
  output logic signed [N_CH-1:0][DAC_W-1:0] sim_dac_if,
  output logic signed [N_CH-1:0][IQ_W-1:0]  sim_mon_i,
  output logic signed [N_CH-1:0][IQ_W-1:0]  sim_mon_q,
  output logic signed [N_CH-1:0][31:0]      sim_mon_detune,
  output logic signed [N_REC-1:0][IQ_W-1:0] sim_rec_ch,
  output logic                              sim_rec_valid,
  output logic                              sim_rec_trig
);
  cavity_controller u_ctrl (
    .clk, .rst, .adc(ctrl_adc), .trig_adc(ctrl_trig_adc), .host(ctrl_host),
    .dac_i(ctrl_dac_i), .dac_q(ctrl_dac_q), .vs_i(ctrl_vs_i), .vs_q(ctrl_vs_q),
    .enag(ctrl_enag), .sat(ctrl_sat));

  cavity_simulator u_sim (
    .clk, .rst, .adc_i(sim_adc_i), .adc_q(sim_adc_q), .beam_on(sim_beam_on), .host(sim_host),
    .dac_if(sim_dac_if), .mon_i(sim_mon_i), .mon_q(sim_mon_q), .mon_detune(sim_mon_detune),
    .rec_trig_adc(sim_rec_trig_adc), .rec_ch(sim_rec_ch), .rec_valid(sim_rec_valid),
    .rec_trig(sim_rec_trig));
endmodule
