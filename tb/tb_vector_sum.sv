// tb_vector_sum: random components of eight channels and random enable masks;
// the registered sum must equal the integer sum of the enabled channels,
// including the all-extreme cases that need the full 19 bits.
`timescale 1ns/1ps
module tb_vector_sum;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] ch_en;
  logic signed [7:0][15:0] din;
  logic signed [18:0] sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vector_sum #(.N(8), .W(16)) dut (.clk, .rst, .ch_en, .din, .sum);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    ch_en = '1; din = '0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      exp = 0;
      ch_en = (n < 2) ? 8'hff : 8'($urandom);
      for (int c = 0; c < 8; c++) begin
        din[c] = (n == 0) ? 16'sh7fff : (n == 1) ? 16'sh8000 : 16'($urandom);
        if (ch_en[c]) exp += int'($signed(din[c]));
      end
      @(posedge clk); #1;
      check(int'(sum) == exp, $sformatf("sum %0d want %0d mask %b", sum, exp, ch_en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
