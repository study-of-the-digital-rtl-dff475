// vector_rotation: loop gain and loop phase correction of one cavity channel.
//
// Each RF channel has its own cable and electronics phase, so before the
// channels can be summed their base-band vectors are brought to a common
// reference phase and gain:
//     I' = g cos(t) * I - g sin(t) * Q
//     Q' = g sin(t) * I + g cos(t) * Q
// The host supplies gcos = g*cos(t) and gsin = g*sin(t) as signed fixed-point
// numbers with CFRAC fractional bits (65536 = 1.0 with the defaults). The
// rotation formula is the system's; the coefficient format, rounding by
// arithmetic shift (toward minus infinity) and saturation to W bits are this
// design's choices.
//
// Timing: one register stage; outputs follow inputs by one cycle.
`timescale 1ns/1ps
module vector_rotation #(
  parameter int W     = 16,
  parameter int CW    = 18,
  parameter int CFRAC = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [W-1:0]  i_in,
  input  logic signed [W-1:0]  q_in,
  input  logic signed [CW-1:0] gcos,
  input  logic signed [CW-1:0] gsin,
  output logic signed [W-1:0]  i_out,
  output logic signed [W-1:0]  q_out
);
  localparam int PW = W + CW + 1;
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  function automatic logic signed [W-1:0] sat_w(input logic signed [PW-1:0] v);
    if (v > PW'(MAXV))      return MAXV;
    else if (v < PW'(MINV)) return MINV;
    else                    return W'(v);
  endfunction

  logic signed [PW-1:0] pi, pq;
  always_comb begin
    pi = (PW'(gcos) * PW'(i_in) - PW'(gsin) * PW'(q_in)) >>> CFRAC;
    pq = (PW'(gsin) * PW'(i_in) + PW'(gcos) * PW'(q_in)) >>> CFRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= sat_w(pi);
      q_out <= sat_w(pq);
    end
  end
endmodule
