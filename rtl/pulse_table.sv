// pulse_table: time-indexed waveform table of the controller.
//
// The controller holds four of these: the I and Q set-point waveforms of the
// vector sum and the I and Q feed-forward waveforms. The host writes entries
// through a single write port; during an RF pulse the global timing steps the
// read address once per microsecond, so entry n applies to the n-th
// microsecond of the pulse. The tables and their write/read addressing are the
// system's; the depth (2048 entries, enough for a 1.5 ms pulse plus margin)
// and word width are this design's choices.
//
// Interface: write port we/waddr/wdata, read port raddr/rdata.
// Timing: synchronous read, rdata is valid one cycle after raddr. The content
// starts as zero.
`timescale 1ns/1ps
module pulse_table #(
  parameter int DEPTH = 2048,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr,
  output logic signed [W-1:0] rdata
);
  logic signed [W-1:0] mem [DEPTH];

  initial for (int k = 0; k < DEPTH; k++) mem[k] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
