// pi_controller: one PI feedback channel plus feed-forward (I or Q).
//
// The error is set point minus measured vector sum. The output is
//     ctrl = Kp*err + Ki*sum(err) + FF
// where the proportional and integral parts are used when fb_en is set and
// the feed-forward value when ff_en is set. The structure (error, a P gain, an
// accumulator followed by an I gain, then the feed-forward added) is the
// system's. The number formats are this design's: Kp and Ki are signed with
// GFRAC fractional bits, the integral term is scaled down by another IFRAC
// bits (the accumulator grows by one error per 40 MHz cycle), the accumulator
// saturates and stops integrating while the output is saturated in the same
// direction, and the output saturates to OUT_W bits.
//
// run is the RF gate: while it is low the accumulator is cleared and the
// output is zero. sat is high in cycles whose output was clipped.
// Timing: the output is registered, one cycle after setp/meas/ff.
`timescale 1ns/1ps
module pi_controller #(
  parameter int W     = 19,
  parameter int GW    = 18,
  parameter int GFRAC = 12,
  parameter int IFRAC = 10,
  parameter int ACC_W = 40,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    run,
  input  logic                    fb_en,
  input  logic                    ff_en,
  input  logic signed [W-1:0]     setp,
  input  logic signed [W-1:0]     meas,
  input  logic signed [OUT_W-1:0] ff,
  input  logic signed [GW-1:0]    kp,
  input  logic signed [GW-1:0]    ki,
  output logic signed [OUT_W-1:0] ctrl,
  output logic                    sat
);
  localparam int EW = W + 1;
  localparam int PW = ACC_W + GW + 2;
  localparam logic signed [OUT_W-1:0] OMAX = {1'b0, {(OUT_W-1){1'b1}}};
  localparam logic signed [OUT_W-1:0] OMIN = {1'b1, {(OUT_W-1){1'b0}}};
  localparam logic signed [ACC_W-1:0] AMAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] AMIN = {1'b1, {(ACC_W-1){1'b0}}};

  logic signed [EW-1:0]    err;
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W:0]   acc_sum;
  logic signed [PW-1:0]    p_term, i_term, total;
  logic signed [OUT_W-1:0] out_n;
  logic                    sat_n, hold;

  always_comb begin
    err     = EW'(setp) - EW'(meas);
    p_term  = (PW'(kp) * PW'(err)) >>> GFRAC;
    i_term  = (PW'(ki) * PW'(acc)) >>> (GFRAC + IFRAC);
    total   = '0;
    if (fb_en) total = p_term + i_term;
    if (ff_en) total = total + PW'(ff);
    sat_n   = 1'b0;
    if (total > PW'(OMAX)) begin
      out_n = OMAX; sat_n = 1'b1;
    end else if (total < PW'(OMIN)) begin
      out_n = OMIN; sat_n = 1'b1;
    end else begin
      out_n = OUT_W'(total);
    end
    // Conditional integration: no further accumulation into a saturated output
    hold    = sat && (err[EW-1] == ctrl[OUT_W-1]);
    acc_sum = (ACC_W+1)'(acc) + (ACC_W+1)'(err);
  end

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      acc  <= '0;
      ctrl <= '0;
      sat  <= 1'b0;
    end else begin
      if (fb_en && !hold) begin
        if (acc_sum > (ACC_W+1)'(AMAX))      acc <= AMAX;
        else if (acc_sum < (ACC_W+1)'(AMIN)) acc <= AMIN;
        else                                 acc <= ACC_W'(acc_sum);
      end
      ctrl <= out_n;
      sat  <= sat_n;
    end
  end
endmodule
