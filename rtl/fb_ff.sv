// fb_ff: feedback and feed-forward unit of the cavity controller.
//
// Holds the four pulse tables (I and Q set point, I and Q feed-forward) and
// the two PI channels. During a pulse the tables are read at addr_r; the set
// point is compared with the filtered vector sum and the PI output plus the
// feed-forward value forms the control vector Ctrl_I / Ctrl_Q. The table
// write port is the one of the controller's setting register: a set-point
// write (en_sp) loads I from data_w[15:0] and Q from data_w[31:16] into both
// set tables at once; feed-forward writes (en_ffi, en_ffq) use data_w[15:0].
// Set-point entries are per-cavity values: they are multiplied by 2^SP_SHIFT
// (the channel count, 8) to compare with the vector sum. The block and its
// signal names follow the system's diagram; the data packing and set-point
// scale are this design's.
//
// Timing: table read takes one cycle, so enag is delayed by one cycle to stay
// aligned with the table data; the PI stage adds one more cycle.
`timescale 1ns/1ps
module fb_ff
  import llrf_pkg::*;
#(
  parameter int DEPTH    = 2048,
  parameter int SP_SHIFT = 3,
  localparam int AW      = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [VS_W-1:0] vs_i,
  input  logic signed [VS_W-1:0] vs_q,
  input  logic [AW-1:0]          addr_w,
  input  logic [31:0]            data_w,
  input  logic                   en_sp,
  input  logic                   en_ffi,
  input  logic                   en_ffq,
  input  logic [AW-1:0]          addr_r,
  input  logic                   enag,
  input  logic                   fb_en,
  input  logic                   ff_en,
  input  logic signed [17:0]     kp,
  input  logic signed [17:0]     ki,
  output logic signed [IQ_W-1:0] ctrl_i,
  output logic signed [IQ_W-1:0] ctrl_q,
  output logic [1:0]             sat
);
  logic signed [IQ_W-1:0] sp_i, sp_q, ff_i, ff_q;
  logic signed [VS_W-1:0] setp_i, setp_q;
  logic                   run;

  pulse_table #(.DEPTH(DEPTH), .W(IQ_W)) u_set_i (
    .clk, .we(en_sp),  .waddr(addr_w), .wdata(data_w[15:0]),  .raddr(addr_r), .rdata(sp_i));
  pulse_table #(.DEPTH(DEPTH), .W(IQ_W)) u_set_q (
    .clk, .we(en_sp),  .waddr(addr_w), .wdata(data_w[31:16]), .raddr(addr_r), .rdata(sp_q));
  pulse_table #(.DEPTH(DEPTH), .W(IQ_W)) u_ff_i (
    .clk, .we(en_ffi), .waddr(addr_w), .wdata(data_w[15:0]),  .raddr(addr_r), .rdata(ff_i));
  pulse_table #(.DEPTH(DEPTH), .W(IQ_W)) u_ff_q (
    .clk, .we(en_ffq), .waddr(addr_w), .wdata(data_w[15:0]),  .raddr(addr_r), .rdata(ff_q));

  always_ff @(posedge clk) begin
    if (rst) run <= 1'b0;
    else     run <= enag;
  end

  assign setp_i = VS_W'(sp_i) <<< SP_SHIFT;
  assign setp_q = VS_W'(sp_q) <<< SP_SHIFT;

  pi_controller #(.W(VS_W), .OUT_W(IQ_W)) u_pi_i (
    .clk, .rst, .run, .fb_en, .ff_en, .setp(setp_i), .meas(vs_i), .ff(ff_i),
    .kp, .ki, .ctrl(ctrl_i), .sat(sat[0]));
  pi_controller #(.W(VS_W), .OUT_W(IQ_W)) u_pi_q (
    .clk, .rst, .run, .fb_en, .ff_en, .setp(setp_q), .meas(vs_q), .ff(ff_q),
    .kp, .ki, .ctrl(ctrl_q), .sat(sat[1]));
endmodule
