// record_feed: decimated waveform feed for the simulator's waveform recorder.
//
// The simulator hands selected waveforms to a board memory recorder for
// later read-out by the host. This block prepares that feed: it takes N
// 16-bit channels at the 40 MHz rate, keeps one sample out of every DECIM
// (1 us with the defaults), and raises rec_valid for one cycle each time a
// new set is presented. A record trigger comes from a separate sampled ADC
// input compared against a level (a > b) and registered; rec_trig tells
// whether the trigger was above the level at any time during the window
// that ends at the decimation point, so a trigger pulse shorter than the
// window is not lost between samples. The memory controller itself is
// board-specific and is not part of this design.
//
// How: a modulo-DECIM counter; when it wraps, all channels and the sticky
// trigger flag are copied into output registers that hold until the next
// wrap, and the flag restarts.
//
// Interface: ch[N] input words, trig_adc sampled trigger input;
// rec_ch[N] held decimated words, rec_valid one-cycle strobe, rec_trig.
// Timing: rec_ch/rec_valid change on the cycle after the counter wraps;
// the comparator adds one register, so rec_trig covers the trigger samples
// from two cycles before the previous wrap up to two cycles before this one.
// Follows the system's diagram: ten channels, down-sampling by 40, a
// comparator against half scale with a register. This design's choices:
// the level of half the ADC range as the code 4096, the sticky trigger
// within a window, and free-running decimation phase from reset.
`timescale 1ns/1ps
module record_feed #(
  parameter int N          = 10,
  parameter int W          = 16,
  parameter int DECIM      = 40,
  parameter int IN_W       = 14,
  parameter int TRIG_LEVEL = 4096
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic signed [N-1:0][W-1:0] ch,
  input  logic signed [IN_W-1:0]     trig_adc,
  output logic signed [N-1:0][W-1:0] rec_ch,
  output logic                       rec_valid,
  output logic                       rec_trig
);
  localparam int CW = $clog2(DECIM);
  logic [CW-1:0] cnt;
  logic          above, seen;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      above     <= 1'b0;
      seen      <= 1'b0;
      rec_ch    <= '0;
      rec_valid <= 1'b0;
      rec_trig  <= 1'b0;
    end else begin
      above     <= trig_adc > IN_W'(TRIG_LEVEL);
      rec_valid <= 1'b0;
      if (cnt == CW'(DECIM - 1)) begin
        cnt       <= '0;
        rec_ch    <= ch;
        rec_trig  <= seen | above;
        seen      <= 1'b0;
        rec_valid <= 1'b1;
      end else begin
        cnt  <= cnt + 1'b1;
        seen <= seen | above;
      end
    end
  end
endmodule
