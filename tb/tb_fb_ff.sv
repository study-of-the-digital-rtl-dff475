// tb_fb_ff: loads the set-point table (I and Q in one write) and the two
// feed-forward tables with address-dependent values, then steps the read
// address with the gate high and checks, two cycles after each address,
//   Ctrl_I = Kp*(8*SP_I - VS_I) + FF_I,  Ctrl_Q = Kp*(8*SP_Q - VS_Q) + FF_Q
// for Kp = 1 and Kp = 0.5 with Ki = 0, the feed-forward-only mode, and a zero
// output with the gate low.
`timescale 1ns/1ps
module tb_fb_ff;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [18:0] vs_i, vs_q;
  logic [10:0] addr_w, addr_r;
  logic [31:0] data_w;
  logic en_sp, en_ffi, en_ffq, enag, fb_en, ff_en;
  logic signed [17:0] kp, ki;
  logic signed [15:0] ctrl_i, ctrl_q;
  logic [1:0] sat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fb_ff #(.DEPTH(2048)) dut (.clk, .rst, .vs_i, .vs_q, .addr_w, .data_w, .en_sp, .en_ffi, .en_ffq,
    .addr_r, .enag, .fb_en, .ff_en, .kp, .ki, .ctrl_i, .ctrl_q, .sat);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int spi(input int a); return a * 3 - 1000; endfunction
  function automatic int spq(input int a); return 500 - a * 2; endfunction
  function automatic int ffi(input int a); return a * 5; endfunction
  function automatic int ffq(input int a); return -a * 7; endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_addrs(input int kp_num, input bit fb, input bit ffe);
    int ei, eq;
    for (int a = 0; a < 400; a += 13) begin
      @(negedge clk);
      addr_r = 11'(a); enag = 1;
      vs_i = 19'($signed($urandom_range(0, 20000)) - 10000);
      vs_q = 19'($signed($urandom_range(0, 20000)) - 10000);
      @(posedge clk); @(posedge clk); #1;
      ei = 0; eq = 0;
      if (fb) begin
        ei = (kp_num * (8 * spi(a) - int'(vs_i))) >>> 12;
        eq = (kp_num * (8 * spq(a) - int'(vs_q))) >>> 12;
      end
      if (ffe) begin ei += ffi(a); eq += ffq(a); end
      check(int'(ctrl_i) == ei && int'(ctrl_q) == eq,
            $sformatf("addr %0d: (%0d,%0d) want (%0d,%0d)", a, ctrl_i, ctrl_q, ei, eq));
    end
  endtask

  initial begin
    vs_i = 0; vs_q = 0; addr_w = 0; addr_r = 0; data_w = 0;
    en_sp = 0; en_ffi = 0; en_ffq = 0; enag = 0; fb_en = 0; ff_en = 0; kp = 0; ki = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); addr_w = 11'(a);
      en_sp = 1; data_w = {16'(spq(a)), 16'(spi(a))};
      @(negedge clk); en_sp = 0; en_ffi = 1; data_w = 32'(ffi(a));
      @(negedge clk); en_ffi = 0; en_ffq = 1; data_w = 32'(ffq(a));
      @(negedge clk); en_ffq = 0;
    end
    fb_en = 1; ff_en = 1; kp = 18'sd4096;
    run_addrs(4096, 1, 1);
    kp = 18'sd2048;
    run_addrs(2048, 1, 1);
    fb_en = 0;
    run_addrs(2048, 0, 1);
    @(negedge clk); enag = 0; fb_en = 1;
    @(posedge clk); @(posedge clk); #1;
    check(ctrl_i == 0 && ctrl_q == 0, "gate low gives zero output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
