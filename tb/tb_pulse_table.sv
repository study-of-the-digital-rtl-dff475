// tb_pulse_table: fills the 2048-entry table with a computed waveform, reads
// it back in order and at random addresses (one-cycle read latency), checks
// initial zeros, and that a write does not disturb other entries.
`timescale 1ns/1ps
module tb_pulse_table;
  logic clk = 1'b0;
  logic we;
  logic [10:0] waddr, raddr;
  logic signed [15:0] wdata, rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pulse_table #(.DEPTH(2048), .W(16)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic signed [15:0] pattern(input int a);
    return 16'(a * 37 - 20000);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    @(negedge clk); raddr = 11'd5;
    @(posedge clk); #1 check(rdata == 0, "initial content zero");
    for (a = 0; a < 2048; a++) begin
      @(negedge clk); we = 1; waddr = 11'(a); wdata = pattern(a);
    end
    @(negedge clk); we = 0;
    for (a = 0; a < 2048; a += 7) begin
      @(negedge clk); raddr = 11'(a);
      @(posedge clk); #1 check(rdata == pattern(a), $sformatf("read %0d", a));
    end
    for (int n = 0; n < 200; n++) begin
      a = $urandom_range(0, 2047);
      @(negedge clk); raddr = 11'(a);
      @(posedge clk); #1 check(rdata == pattern(a), $sformatf("random read %0d", a));
    end
    @(negedge clk); we = 1; waddr = 11'd100; wdata = 16'sh1234; raddr = 11'd101;
    @(posedge clk); #1 check(rdata == pattern(101), "neighbour unchanged");
    @(negedge clk); we = 0; raddr = 11'd100;
    @(posedge clk); #1 check(rdata == 16'sh1234, "overwritten entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
