// tb_ctrl_setting_register: checks reset values, each register of the map,
// the rotation coefficients of all eight channels, and the table write port:
// one strobe of the right kind per data write, carrying the data and the
// auto-incremented table address.
`timescale 1ns/1ps
module tb_ctrl_setting_register;
  import llrf_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  host_wr_t host;
  ctrl_cfg_t cfg;
  tbl_wr_t tbl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_setting_register dut (.clk, .rst, .host, .cfg, .tbl);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); host.we = 1; host.addr = 8'(a); host.data = d;
    @(posedge clk); #1;
    @(negedge clk); host.we = 0;
  endtask

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
    check(cfg.pulse_len == 1500 && cfg.ch_en == 8'hff && !cfg.fb_en && !cfg.dac_en, "reset values");
    check($signed(cfg.gcos[3]) == 65536 && cfg.gsin[3] == 0, "reset rotation is unity");
    wr(0, 32'h5); check(cfg.fb_en && !cfg.ff_en && cfg.dac_en, "control bits");
    wr(1, 32'h3_0000 | 32'd1234); check(cfg.kp == 18'h304D2, "kp");
    wr(2, 32'd77); check(cfg.ki == 18'd77, "ki");
    wr(3, 32'd1000); check(cfg.pulse_len == 11'd1000, "pulse length");
    wr(4, 32'h0f); check(cfg.ch_en == 8'h0f, "channel mask");
    for (int c = 0; c < 8; c++) begin
      wr(16 + 2 * c, 32'(1000 + c)); wr(17 + 2 * c, 32'(2000 + c));
    end
    for (int c = 0; c < 8; c++)
      check(cfg.gcos[c] == 18'(1000 + c) && cfg.gsin[c] == 18'(2000 + c), $sformatf("rotation ch %0d", c));
    wr(5, 32'd40);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk); host.we = 1; host.addr = 8'(6 + k % 3); host.data = 32'hA000_0000 + 32'(k);
      @(posedge clk); #1;
      check(tbl.addr == 11'(40 + k) && tbl.data == 32'hA000_0000 + 32'(k), $sformatf("table write %0d addr %0d", k, tbl.addr));
      check(tbl.en_sp == (k % 3 == 0) && tbl.en_ffi == (k % 3 == 1) && tbl.en_ffq == (k % 3 == 2), "strobe kind");
      @(negedge clk); host.we = 0;
      @(posedge clk); #1;
      check(!tbl.en_sp && !tbl.en_ffi && !tbl.en_ffq, "strobe lasts one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
