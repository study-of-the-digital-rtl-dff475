// lpf_average: low-pass filter of the vector sum, a moving average.
//
// The demodulator refreshes I and Q on alternate samples, so the raw vector
// sum carries a ripple at the sample rate and noise from the converters. The
// filter averages the last 2^LOG2_LEN inputs (four with the default, one IF
// period). The system only names an averaging low-pass filter at this point;
// the boxcar form and its length are this design's choice.
//
// Implementation: a shift register of the last inputs and a running sum that
// adds the new input and subtracts the one leaving the window.
// Timing: dout is registered; a step at din appears fully after LEN cycles.
`timescale 1ns/1ps
module lpf_average #(
  parameter int W        = 19,
  parameter int LOG2_LEN = 2
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  localparam int LEN = 1 << LOG2_LEN;
  localparam int AW  = W + LOG2_LEN;

  logic signed [W-1:0]  hist [LEN];
  logic signed [AW-1:0] acc, acc_next;

  assign acc_next = acc + AW'(din) - AW'(hist[LEN-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < LEN; k++) hist[k] <= '0;
      acc  <= '0;
      dout <= '0;
    end else begin
      hist[0] <= din;
      for (int k = 1; k < LEN; k++) hist[k] <= hist[k-1];
      acc  <= acc_next;
      dout <= W'(acc_next >>> LOG2_LEN);
    end
  end
endmodule
