// tb_sim_setting_register: writes every global register and every
// coefficient of every cavity with distinct values and reads them back from
// the configuration outputs; checks reset values and that a write to an
// unused address changes nothing.
`timescale 1ns/1ps
module tb_sim_setting_register;
  import llrf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  host_wr_t host;
  sim_cfg_t cfg, cfg_prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sim_setting_register dut (.clk, .rst, .host, .cfg);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); host.we = 1; host.addr = 8'(a); host.data = 32'(d);
    @(negedge clk); host.we = 0;
  endtask

  function automatic int val(input int c, input int k);
    return (c + 1) * 1000 + k * 17 - 4000;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(cfg.cav_en == 8'hff && cfg.ib_i == 0 && cfg.cav[3].c_bw == 0, "reset values");
    wr(0, -12); wr(1, 34); wr(2, -5000); wr(3, 6000); wr(4, 'h5a);
    check(cfg.off_i == -16'sd12 && cfg.off_q == 16'sd34 && cfg.ib_i == -16'sd5000 &&
          cfg.ib_q == 16'sd6000 && cfg.cav_en == 8'h5a, "global registers");
    for (int c = 0; c < N_CH; c++)
      for (int k = 0; k < 3 + 3 * N_MODES; k++) wr(16 + 16 * c + k, val(c, k));
    for (int c = 0; c < N_CH; c++) begin
      check(int'(cfg.cav[c].c_bw) == val(c, 0) && int'(cfg.cav[c].c_in) == val(c, 1) &&
            int'(cfg.cav[c].d0) == val(c, 2), $sformatf("cavity %0d electrical coefficients", c));
      for (int m = 0; m < N_MODES; m++)
        check(int'(cfg.cav[c].mode[m].ka) == val(c, 3 + 3 * m) && int'(cfg.cav[c].mode[m].kb) == val(c, 4 + 3 * m) &&
              int'(cfg.cav[c].mode[m].kc) == val(c, 5 + 3 * m), $sformatf("cavity %0d mode %0d", c, m));
    end
    cfg_prev = cfg;
    wr(8'h0f, 99); wr(8'h1f, 99); wr(8'h9f, 99);
    check(cfg == cfg_prev, "unused addresses ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
