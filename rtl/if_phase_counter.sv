// if_phase_counter: sample position within the 10 MHz IF period.
//
// The 40 MHz sample clock gives four samples per IF period. This wrap-around
// counter numbers them 0..3; the demodulators of the controller and the IF
// generators of the simulator read it to know which of the I, -Q, -I, Q
// components the current sample carries. The figures of the system show such
// a "Counter" block; its width follows from the 40 MHz / 10 MHz ratio.
//
// Interface: clk, synchronous active-high rst, phase output.
// Timing: phase is 0 in the first cycle after reset and advances every cycle.
`timescale 1ns/1ps
module if_phase_counter #(
  parameter int W = 2
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] phase
);
  always_ff @(posedge clk) begin
    if (rst) phase <= '0;
    else     phase <= phase + 1'b1;
  end
endmodule
