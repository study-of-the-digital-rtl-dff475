// tb_cavity_simulator: eight cavities driven by one constant I/Q drive.
// Cavities get different coupling and detuning; after settling each base-band
// voltage must match the steady state of the cavity equation,
//   V = (c_in/c_bw) * I / (1 - j d/c_bw),  I = 4*adc - offset (+ beam),
// the IF outputs must carry I, -Q, -I, Q of the voltage (upper 14 bits), the
// beam must load the cavities while beam_on is high, and a disabled cavity
// must hold its state. The recorder feed must present, every 40 cycles, the
// I/Q of cavities 0-3 and the drive current as they were on the cycle
// before, and flag the windows in which its trigger input went above 4096.
`timescale 1ns/1ps
module tb_cavity_simulator;
  import llrf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [ADC_W-1:0] adc_i, adc_q;
  logic beam_on;
  host_wr_t host;
  logic signed [N_CH-1:0][DAC_W-1:0] dac_if;
  logic signed [N_CH-1:0][IQ_W-1:0] mon_i, mon_q;
  logic signed [N_CH-1:0][31:0] mon_detune;
  logic signed [ADC_W-1:0] rec_trig_adc;
  logic signed [N_REC-1:0][IQ_W-1:0] rec_ch, rec_exp;
  logic rec_valid, rec_trig;
  int n_rec = 0, n_rec_trig = 0;
  logic [1:0] ph;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) ph <= rst ? 2'd0 : ph + 2'd1;

  cavity_simulator dut (.clk, .rst, .adc_i, .adc_q, .rec_trig_adc, .beam_on, .host, .dac_if,
                        .mon_i, .mon_q, .mon_detune, .rec_ch, .rec_valid, .rec_trig);

  // recorder feed: the words captured at a decimation point are the monitor
  // values and drive current present just before that clock edge
  always @(negedge clk) begin
    if (!rst && rec_valid) begin
      n_rec++;
      if (rec_trig) n_rec_trig++;
      check(rec_ch == rec_exp, $sformatf("recorder words at word set %0d", n_rec));
    end
    for (int c = 0; c < 4; c++) begin
      rec_exp[2 * c] = mon_i[c];
      rec_exp[2 * c + 1] = mon_q[c];
    end
    rec_exp[8] = dut.cur_i;
    rec_exp[9] = dut.cur_q;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); host.we = 1; host.addr = 8'(a); host.data = 32'(d);
    @(negedge clk); host.we = 0;
  endtask

  function automatic bit near(input int a, input real b, input int tol);
    return (real'(a) > b - tol) && (real'(a) < b + tol);
  endfunction

  // steady state for drive (xi, xq), gain g = c_in/c_bw, r = d/c_bw
  task automatic expect_ss(input int c, input real xi, input real xq, input real g, input real r);
    real den, ei, eq;
    den = 1.0 + r * r;
    ei = g * (xi - r * xq) / den;
    eq = g * (xq + r * xi) / den;
    check(near(int'($signed(mon_i[c])), ei, 8) && near(int'($signed(mon_q[c])), eq, 8),
          $sformatf("cavity %0d: (%0d,%0d) want (%.1f,%.1f)", c, $signed(mon_i[c]), $signed(mon_q[c]), ei, eq));
  endtask

  real gain[N_CH], rdet[N_CH];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ci;
    host = '0; adc_i = 0; adc_q = 0; beam_on = 0; rec_trig_adc = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wr(8'h00, 40); wr(8'h01, -24);          // ADC offsets
    wr(8'h02, -2000); wr(8'h03, 1000);      // beam current
    for (int c = 0; c < N_CH; c++) begin
      ci = 65536 * (c % 4 + 1) / 4;         // gain 0.25 .. 1
      gain[c] = real'(ci) / 65536.0;
      rdet[c] = (c >= 4) ? real'(c - 4) * 0.5 : 0.0;
      wr(16 + 16 * c + 0, 65536);
      wr(16 + 16 * c + 1, ci);
      wr(16 + 16 * c + 2, int'(rdet[c] * 65536.0));
    end
    @(negedge clk); adc_i = 14'sd2010; adc_q = -14'sd1006;
    repeat (6000) @(posedge clk);
    #1;
    for (int c = 0; c < N_CH; c++) expect_ss(c, 8000.0, -4000.0, gain[c], rdet[c]);
    // IF outputs over one period
    for (int k = 0; k < 8; k++) begin
      logic [1:0] p;
      logic signed [N_CH-1:0][IQ_W-1:0] mi, mq;
      @(negedge clk); p = ph; mi = mon_i; mq = mon_q;
      @(posedge clk); #1;
      for (int c = 0; c < N_CH; c++) begin
        int e, vi, vq;
        vi = int'($signed(mi[c])) >>> 2; vq = int'($signed(mq[c])) >>> 2;
        case (p) 0: e = vi; 1: e = -vq; 2: e = -vi; default: e = vq; endcase
        check(int'($signed(dac_if[c])) == e, $sformatf("IF of cavity %0d phase %0d: %0d want %0d", c, p, $signed(dac_if[c]), e));
      end
    end
    // two short record-trigger pulses, well apart
    check(n_rec_trig == 0 && n_rec > 100, $sformatf("recorder: %0d word sets, no trigger yet", n_rec));
    @(negedge clk); rec_trig_adc = 14'sd8000;
    @(negedge clk); rec_trig_adc = 0;
    repeat (100) @(negedge clk);
    rec_trig_adc = 14'sd6000;
    repeat (3) @(negedge clk);
    rec_trig_adc = 0;
    repeat (100) @(negedge clk);
    check(n_rec_trig == 2, $sformatf("recorder trigger windows %0d want 2", n_rec_trig));
    // beam loading
    @(negedge clk); beam_on = 1;
    repeat (6000) @(posedge clk);
    #1;
    for (int c = 0; c < N_CH; c++) expect_ss(c, 6000.0, -3000.0, gain[c], rdet[c]);
    // cavity 0 disabled holds its voltage while the drive changes
    wr(8'h04, 8'hfe);
    begin
      int h;
      h = int'($signed(mon_i[0]));
      @(negedge clk); beam_on = 0; adc_i = 0; adc_q = 0;
      repeat (3000) @(posedge clk);
      #1 check(int'($signed(mon_i[0])) == h, "disabled cavity holds its state");
      check(near(int'($signed(mon_i[1])), gain[1] * -40.0, 4), $sformatf("enabled cavity follows, %0d", $signed(mon_i[1])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
