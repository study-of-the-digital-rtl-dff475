// mech_mode: one mechanical mode of Lorentz-force detuning.
//
// The radiation pressure of the RF field, proportional to V^2, drives the
// cavity's mechanical resonances, and each mode detunes the cavity. For mode m
// with frequency f_m, quality factor Q_m and detuning constant K_m:
//     d(dw)/dt  = dw'
//     d(dw')/dt = -(2 pi f_m)^2 dw - (2 pi f_m / Q_m) dw' - 2 pi K_m (2 pi f_m)^2 V^2
// This block integrates that equation with forward Euler, one step each cycle
// that en is high, in two fixed-point states:
//     xf = detuning with G extra fraction bits; the output is dw = xf / 2^G in
//          units of 2^-24 rad per step (dw_phys * dt * 2^24)
//     yw = change of xf per step, times 2^H
// and the update
//     xf += round(yw / 2^H)
//     yw += -ka*xf - round(kb*yw / 2^H) - kc*vsq
// with ka = (2 pi f_m dt)^2 * 2^H, kb = (2 pi f_m / Q_m) dt * 2^H, and kc the
// Lorentz drive for the V^2 scale used (vsq is the squared magnitude of the
// 16-bit cavity voltage; the static detuning is -kc*vsq/ka in xf units). yw
// accumulates the update without a shift, so no small increment is lost and
// the detuning settles to its static value without a dead band. The
// differential equation is the system's; the integration method, widths and
// scalings are this design's. Both states saturate instead of wrapping.
//
// Timing: state registers; dw is updated the cycle after en.
`timescale 1ns/1ps
module mech_mode #(
  parameter int XW = 32,
  parameter int G  = 16,
  parameter int YW = 64,
  parameter int KW = 25,
  parameter int H  = 40
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic [31:0]          vsq,
  input  logic signed [KW-1:0] ka,
  input  logic signed [KW-1:0] kb,
  input  logic signed [KW-1:0] kc,
  output logic signed [XW-1:0] dw
);
  localparam int FW = XW + G;
  localparam int AW = YW + KW + 2;
  localparam logic signed [FW-1:0] FMAX = {1'b0, {(FW-1){1'b1}}};
  localparam logic signed [FW-1:0] FMIN = {1'b1, {(FW-1){1'b0}}};
  localparam logic signed [YW-1:0] YMAX = {1'b0, {(YW-1){1'b1}}};
  localparam logic signed [YW-1:0] YMIN = {1'b1, {(YW-1){1'b0}}};
  localparam logic signed [AW-1:0] HALF = AW'(1) <<< (H - 1);

  logic signed [FW-1:0] xf;
  logic signed [YW-1:0] yw;
  logic signed [AW-1:0] y_n, x_n, damp;

  always_comb begin
    damp = (AW'(kb) * AW'(yw) + HALF) >>> H;
    y_n  = AW'(yw) - AW'(ka) * AW'(xf) - damp - AW'(kc) * AW'(signed'({1'b0, vsq}));
    x_n  = AW'(xf) + ((AW'(yw) + HALF) >>> H);
  end

  assign dw = XW'(xf >>> G);

  always_ff @(posedge clk) begin
    if (rst) begin
      xf <= '0;
      yw <= '0;
    end else if (en) begin
      if (x_n > AW'(FMAX))      xf <= FMAX;
      else if (x_n < AW'(FMIN)) xf <= FMIN;
      else                      xf <= FW'(x_n);
      if (y_n > AW'(YMAX))      yw <= YMAX;
      else if (y_n < AW'(YMIN)) yw <= YMIN;
      else                      yw <= YW'(y_n);
    end
  end
endmodule
