// vector_sum: sum of one base-band component over all cavity channels.
//
// The beam sees the vector sum of all cavity voltages, so that sum is the
// quantity the controller regulates. One instance adds the rotated I parts,
// a second the rotated Q parts. Channels whose ch_en bit is low contribute
// zero, which lets the controller run with fewer cavities than inputs. The
// result is kept at full precision (W + clog2(N) bits), so it cannot
// overflow. Summing is the system's; the enable mask is this design's.
//
// Timing: one register stage.
`timescale 1ns/1ps
module vector_sum #(
  parameter int N = 8,
  parameter int W = 16,
  localparam int SW = W + $clog2(N)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [N-1:0]              ch_en,
  input  logic signed [N-1:0][W-1:0] din,
  output logic signed [SW-1:0]      sum
);
  logic signed [SW-1:0] acc;
  always_comb begin
    acc = '0;
    for (int c = 0; c < N; c++)
      if (ch_en[c]) acc = acc + SW'($signed(din[c]));
  end

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else     sum <= acc;
  end
endmodule
