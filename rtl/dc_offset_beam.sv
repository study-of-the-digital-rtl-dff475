// dc_offset_beam: drive current of the cavity simulator.
//
// The simulator receives the controller's I/Q drive through two ADCs. This
// block removes the DC offset of those converters and adds the beam-loading
// current while the beam is on, giving the total current I = I_g + I_b that
// drives the cavity equation:
//     out = (in << (W-IN_W)) - off + (beam_on ? ib : 0), saturated to W bits.
// That the cavity current contains the drive and the beam is the system's;
// the offset subtraction, the beam gate input and the formats are this
// design's.
//
// Timing: one register stage.
`timescale 1ns/1ps
module dc_offset_beam #(
  parameter int IN_W = 14,
  parameter int W    = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] in_i,
  input  logic signed [IN_W-1:0] in_q,
  input  logic signed [W-1:0]    off_i,
  input  logic signed [W-1:0]    off_q,
  input  logic                   beam_on,
  input  logic signed [W-1:0]    ib_i,
  input  logic signed [W-1:0]    ib_q,
  output logic signed [W-1:0]    out_i,
  output logic signed [W-1:0]    out_q
);
  localparam int SW = W + 2;
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  function automatic logic signed [W-1:0] sat_w(input logic signed [SW-1:0] v);
    if (v > SW'(MAXV))      return MAXV;
    else if (v < SW'(MINV)) return MINV;
    else                    return W'(v);
  endfunction

  logic signed [SW-1:0] si, sq;
  always_comb begin
    si = (SW'(in_i) <<< (W - IN_W)) - SW'(off_i);
    sq = (SW'(in_q) <<< (W - IN_W)) - SW'(off_q);
    if (beam_on) begin
      si = si + SW'(ib_i);
      sq = sq + SW'(ib_q);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_i <= '0;
      out_q <= '0;
    end else begin
      out_i <= sat_w(si);
      out_q <= sat_w(sq);
    end
  end
endmodule
