// if_modulator: base-band cavity voltage to 10 MHz IF samples.
//
// The simulator's DACs must present each cavity voltage as the IF signal a
// pick-up and down-converter would deliver. With four 40 MHz samples per
// 10 MHz period, the IF samples of a base-band vector (I, Q) are I, -Q, -I, Q,
// which is exactly the order the controller's demodulator expects. The
// 16-bit input is reduced to the DAC width by dropping its low bits. The
// sample order comes from the system's demodulation scheme; using it for the
// simulator's IF output and the format are this design's choices.
//
// Timing: one register stage; if_out carries the component selected by the
// phase of the previous cycle.
`timescale 1ns/1ps
module if_modulator #(
  parameter int W     = 16,
  parameter int DAC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [1:0]              phase,
  input  logic signed [W-1:0]     i_in,
  input  logic signed [W-1:0]     q_in,
  output logic signed [DAC_W-1:0] if_out
);
  localparam logic signed [DAC_W-1:0] MAXV = {1'b0, {(DAC_W-1){1'b1}}};

  logic signed [DAC_W-1:0] i_d, q_d, sel;
  always_comb begin
    i_d = i_in[W-1 -: DAC_W];
    q_d = q_in[W-1 -: DAC_W];
    unique case (phase)
      2'd0: sel = i_d;
      2'd1: sel = (q_d == ~MAXV) ? MAXV : -q_d;
      2'd2: sel = (i_d == ~MAXV) ? MAXV : -i_d;
      2'd3: sel = q_d;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) if_out <= '0;
    else     if_out <= sel;
  end
endmodule
