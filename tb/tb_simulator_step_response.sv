// tb_simulator_step_response: 10 ms base-band step response of the cavity
// simulator at its default size, the standard way to judge the simulator.
//
// A constant drive (ADC code 3000, current 12000) is switched on at t = 0.
// Cavity 0 has a 217 Hz half bandwidth (c_bw = c_in = 572) and two
// Lorentz-force modes (250 Hz, Q 50 and 450 Hz, Q 100); cavity 1 is the
// same cavity with the modes switched off (kc = 0). The cavity values are
// typical of 1.3 GHz 9-cell cavities, not measurements. Cavity 1 must
// follow the first-order response 12000 (1 - exp(-t/733 us)) in I with
// Q = 0. Cavity 0 must be pulled off resonance as its field builds up:
// negative detuning, less amplitude than cavity 1, a phase that leaves
// zero, and a detuning that rings at the mechanical frequencies instead of
// rising smoothly.
`timescale 1ns/1ps
module tb_simulator_step_response;
  import llrf_pkg::*;
  localparam int  STEPS_US = 10000;           // 10 ms
  localparam real TAU_US   = 733.0;           // 2^24 / 572 steps of 25 ns
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_i, adc_q, rec_trig_adc;
  logic beam_on;
  host_wr_t host;
  logic signed [N_CH-1:0][DAC_W-1:0] dac_if;
  logic signed [N_CH-1:0][IQ_W-1:0] mon_i, mon_q;
  logic signed [N_CH-1:0][31:0] mon_detune;
  logic signed [N_REC-1:0][IQ_W-1:0] rec_ch;
  logic rec_valid, rec_trig;
  int checks = 0, failures = 0;

  always #12.5 clk = ~clk;      // 40 MHz

  cavity_simulator dut (.clk, .rst, .adc_i, .adc_q, .rec_trig_adc, .beam_on, .host, .dac_if,
                        .mon_i, .mon_q, .mon_detune, .rec_ch, .rec_valid, .rec_trig);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int addr, input int data);
    @(negedge clk);
    host.we = 1'b1; host.addr = 8'(addr); host.data = 32'(data);
    @(negedge clk);
    host.we = 1'b0;
  endtask

  initial begin
    repeat (STEPS_US * TICK_CYCLES + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a0, a1, p0, e1, worst1, d, d_prev, slope_prev, min_d;
    int turns;
    host = '0; adc_i = 0; adc_q = 0; rec_trig_adc = 0; beam_on = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2; c++) begin
      wr(16 + 16 * c + 0, 572);
      wr(16 + 16 * c + 1, 572);
      wr(16 + 16 * c + 3, 1695); wr(16 + 16 * c + 4, 863000); wr(16 + 16 * c + 5, c == 0 ? 250 : 0);
      wr(16 + 16 * c + 6, 5493); wr(16 + 16 * c + 7, 777000); wr(16 + 16 * c + 8, c == 0 ? 400 : 0);
    end
    @(negedge clk); adc_i = 14'sd3000;
    worst1 = 0.0; d_prev = 0.0; slope_prev = 0.0; turns = 0; min_d = 0.0;
    for (int us = 1; us <= STEPS_US; us++) begin
      repeat (TICK_CYCLES) @(negedge clk);
      e1 = real'($signed(mon_i[1])) - 12000.0 * (1.0 - $exp(-real'(us) / TAU_US));
      if (e1 < 0.0) e1 = -e1;
      if (e1 > worst1) worst1 = e1;
      d = real'($signed(mon_detune[0]));
      if (d < min_d) min_d = d;
      // count turning points of the detuning (slope sign changes, ignoring flat parts)
      if ((d - d_prev) * slope_prev < 0.0) turns++;
      if (d != d_prev) slope_prev = d - d_prev;
      d_prev = d;
      if (us % 1000 == 0) begin
        a0 = $sqrt(real'($signed(mon_i[0])) ** 2 + real'($signed(mon_q[0])) ** 2);
        p0 = 180.0 / 3.14159265358979 * $atan2(real'($signed(mon_q[0])), real'($signed(mon_i[0])));
        $display("t = %2d ms: cavity with modes |V| %6.0f phase %6.1f deg detune %5d; without modes I %6d Q %3d",
                 us / 1000, a0, p0, $signed(mon_detune[0]), $signed(mon_i[1]), $signed(mon_q[1]));
      end
    end
    a0 = $sqrt(real'($signed(mon_i[0])) ** 2 + real'($signed(mon_q[0])) ** 2);
    a1 = real'($signed(mon_i[1]));
    p0 = 180.0 / 3.14159265358979 * $atan2(real'($signed(mon_q[0])), real'($signed(mon_i[0])));
    check(worst1 < 40.0, $sformatf("cavity without modes follows the exponential, worst error %.1f", worst1));
    check($signed(mon_q[1]) == 0 && $signed(mon_detune[1]) == 0, "cavity without modes stays on resonance");
    check(min_d < -150.0, $sformatf("Lorentz detuning reaches %.0f units", min_d));
    check(a0 < 0.97 * a1, $sformatf("detuned amplitude %.0f below %.0f", a0, a1));
    check(p0 < -10.0 || p0 > 10.0, $sformatf("detuned phase %.1f deg", p0));
    check(turns >= 2, $sformatf("detuning rings (%0d turning points)", turns));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
