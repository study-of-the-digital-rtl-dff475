// iq_demodulator: base-band I/Q from a 10 MHz IF sampled at 40 MHz.
//
// With four samples per IF period taken 90 degrees apart, the samples of an IF
// signal A*cos(wt + p) carry, in order, I, -Q, -I, Q of its base-band vector
// (I = A cos p, Q = A sin p). This block follows that order: on phase 0 it
// stores the sample as I, on phase 1 the negated sample as Q, on phase 2 the
// negated sample as I and on phase 3 the sample as Q. Each component is
// therefore refreshed every second sample and held in between. The sample
// order is the one the system description gives; the 16-bit output word
// (ADC sample shifted left by OUT_W-IN_W bits) and two's-complement ADC data
// are this design's choices.
//
// Interface: phase from if_phase_counter, signed if_in; i_out/q_out signed.
// Timing: an output changes one cycle after the sample that carries it.
`timescale 1ns/1ps
module iq_demodulator #(
  parameter int IN_W  = 14,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [1:0]              phase,
  input  logic signed [IN_W-1:0]  if_in,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out
);
  // Scale the sample to the output word; negation happens at full width so
  // that the most negative ADC code does not overflow.
  logic signed [OUT_W-1:0] s_pos, s_neg;
  always_comb begin
    s_pos = OUT_W'(if_in) <<< (OUT_W - IN_W);
    s_neg = -s_pos;
    if (s_pos == {1'b1, {(OUT_W-1){1'b0}}}) s_neg = {1'b0, {(OUT_W-1){1'b1}}};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      unique case (phase)
        2'd0: i_out <= s_pos;
        2'd1: q_out <= s_neg;
        2'd2: i_out <= s_neg;
        2'd3: q_out <= s_pos;
      endcase
    end
  end
endmodule
