// global_timing: pulse trigger, table read address and RF gate.
//
// The RF system is pulsed (1.5 ms pulses at 5 Hz). A trigger arrives as a
// sampled analog level: the sample is compared with TRIG_LEVEL (a > b), the
// result is delayed one cycle, and its rising edge starts a pulse. During the
// pulse the table read address addr_r starts at 0 and advances every TICK
// cycles (1 us at 40 MHz) and the RF gate enag is high; after pulse_len
// steps the gate falls and the address returns to 0. The comparator with the
// level 32, the one-cycle delay and the address/gate outputs follow the
// system's block diagram; the tick length and the rule that a trigger during
// a running pulse is ignored are this design's.
//
// Timing: enag rises two cycles after the first trig_in sample above the
// level; tick is a one-cycle strobe in the last cycle of each address step.
`timescale 1ns/1ps
module global_timing #(
  parameter int TICK       = 40,
  parameter int DEPTH      = 2048,
  parameter int IN_W       = 14,
  parameter int TRIG_LEVEL = 32,
  localparam int AW        = $clog2(DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] trig_in,
  input  logic [AW-1:0]          pulse_len,
  output logic [AW-1:0]          addr_r,
  output logic                   enag,
  output logic                   tick
);
  localparam int TW = (TICK > 1) ? $clog2(TICK) : 1;

  logic          above_d, above_d2, start;
  logic [TW-1:0] tcnt;

  assign start = above_d && !above_d2;
  assign tick  = enag && (tcnt == TW'(TICK - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      above_d  <= 1'b0;
      above_d2 <= 1'b0;
      enag     <= 1'b0;
      addr_r   <= '0;
      tcnt     <= '0;
    end else begin
      above_d  <= (trig_in > IN_W'(TRIG_LEVEL));
      above_d2 <= above_d;
      if (!enag) begin
        if (start && pulse_len != '0) begin
          enag   <= 1'b1;
          addr_r <= '0;
          tcnt   <= '0;
        end
      end else if (tick) begin
        tcnt <= '0;
        if (addr_r == pulse_len - 1'b1) begin
          enag   <= 1'b0;
          addr_r <= '0;
        end else begin
          addr_r <= addr_r + 1'b1;
        end
      end else begin
        tcnt <= tcnt + 1'b1;
      end
    end
  end
endmodule
