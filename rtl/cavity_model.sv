// cavity_model: real-time base-band model of one superconducting cavity.
//
// Near resonance a cavity behaves as a parallel RLC circuit. Its base-band
// voltage V = Vr + jVi obeys
//     dVr/dt = -w12 Vr - dw Vi + R_L w12 Ir
//     dVi/dt =  dw Vr - w12 Vi + R_L w12 Ii
// with half bandwidth w12, detuning dw and drive current I (generator plus
// beam). The detuning is a static part plus the sum of N_MODES mechanical
// modes driven by V^2 (mech_mode), which closes the Lorentz-force loop: the
// field detunes the cavity, and the detuning changes the field.
//
// Integration is forward Euler, one step each cycle en is high, on 32-bit
// states whose upper 16 bits are the output voltage:
//     Vr += (-c_bw*Vr - d*Vi + c_in*(Ir << 16)) >>> F       (F = 24)
//     Vi += ( d*Vr - c_bw*Vi + c_in*(Ii << 16)) >>> F
// c_bw = w12*dt*2^24, c_in = R_L*w12*dt*2^24 in units where the steady state
// on resonance is v = (c_in/c_bw)*I, and d = d0 + sum of the mode detunings,
// all in units of 2^-24 rad per step. The equations are the system's; the
// integration method and fixed-point scaling are this design's.
//
// Timing: v_i/v_q and detune are registered state, updated the cycle after en.
`timescale 1ns/1ps
module cavity_model
  import llrf_pkg::*;
#(
  parameter int F  = 24,
  parameter int VW = 32
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   en,
  input  logic signed [IQ_W-1:0] ir,
  input  logic signed [IQ_W-1:0] ii,
  input  cav_coef_t              coef,
  output logic signed [IQ_W-1:0] v_i,
  output logic signed [IQ_W-1:0] v_q,
  output logic signed [31:0]     detune
);
  localparam int AW = VW + 36;
  localparam logic signed [VW-1:0] VMAX = {1'b0, {(VW-1){1'b1}}};
  localparam logic signed [VW-1:0] VMIN = {1'b1, {(VW-1){1'b0}}};

  logic signed [VW-1:0] vr, vi;
  logic signed [N_MODES-1:0][31:0] dw_m;
  logic signed [IQ_W-1:0] vr_h, vi_h;
  logic [31:0] vsq;
  logic signed [35:0] d_sum;
  logic signed [AW-1:0] ar, ai, vr_n, vi_n;

  assign vr_h = vr[VW-1 -: IQ_W];
  assign vi_h = vi[VW-1 -: IQ_W];
  assign vsq  = 32'(vr_h * vr_h) + 32'(vi_h * vi_h);
  assign v_i  = vr_h;
  assign v_q  = vi_h;

  for (genvar m = 0; m < N_MODES; m++) begin : g_mode
    mech_mode #(.KW(KW)) u_mode (
      .clk, .rst, .en, .vsq,
      .ka(coef.mode[m].ka), .kb(coef.mode[m].kb), .kc(coef.mode[m].kc), .dw(dw_m[m]));
  end

  always_comb begin
    d_sum = 36'(coef.d0);
    for (int m = 0; m < N_MODES; m++) d_sum = d_sum + 36'($signed(dw_m[m]));
    ar = -(AW'(coef.c_bw) * AW'(vr)) - (AW'(d_sum) * AW'(vi))
         + (AW'(coef.c_in) * (AW'(ir) <<< 16));
    ai =  (AW'(d_sum) * AW'(vr)) - (AW'(coef.c_bw) * AW'(vi))
         + (AW'(coef.c_in) * (AW'(ii) <<< 16));
    vr_n = AW'(vr) + (ar >>> F);
    vi_n = AW'(vi) + (ai >>> F);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vr     <= '0;
      vi     <= '0;
      detune <= '0;
    end else if (en) begin
      if (vr_n > AW'(VMAX))      vr <= VMAX;
      else if (vr_n < AW'(VMIN)) vr <= VMIN;
      else                       vr <= VW'(vr_n);
      if (vi_n > AW'(VMAX))      vi <= VMAX;
      else if (vi_n < AW'(VMIN)) vi <= VMIN;
      else                       vi <= VW'(vi_n);
      detune <= 32'(d_sum);
    end
  end
endmodule
