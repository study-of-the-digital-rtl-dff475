// tb_record_feed: random channel words and trigger samples against a
// cycle-level reference model of the decimated recorder feed. Checks the
// held words, the one-cycle valid strobe every 40 cycles, and that a
// one-cycle trigger pulse above the level shows up in exactly one recorded
// window while samples at or below the level never do.
`timescale 1ns/1ps
module tb_record_feed;
  localparam int N = 10, DECIM = 40;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [N-1:0][15:0] ch, rec_ch;
  logic signed [13:0] trig_adc;
  logic rec_valid, rec_trig;
  int checks = 0, failures = 0;

  // reference model state
  logic signed [N-1:0][15:0] m_ch;
  logic m_valid, m_trig, m_above, m_seen;
  int m_cnt;
  int n_valid = 0, n_trig_win = 0, last_valid = -1, cyc = 0;

  always #5 clk = ~clk;

  record_feed dut (.clk, .rst, .ch, .trig_adc, .rec_ch, .rec_valid, .rec_trig);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst) begin
      m_cnt = 0; m_ch = '0; m_valid = 0; m_trig = 0; m_above = 0; m_seen = 0;
    end else begin
      logic nxt_above;
      nxt_above = int'(trig_adc) > 4096;
      if (m_cnt == DECIM - 1) begin
        m_cnt = 0; m_ch = ch; m_trig = m_seen | m_above; m_seen = 0; m_valid = 1;
      end else begin
        m_cnt++; m_seen = m_seen | m_above; m_valid = 0;
      end
      m_above = nxt_above;
    end
  end

  initial begin
    ch = '0; trig_adc = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      check(rec_valid == m_valid && rec_trig == m_trig && rec_ch == m_ch,
            $sformatf("cycle %0d: valid %0b/%0b trig %0b/%0b", cyc, rec_valid, m_valid, rec_trig, m_trig));
      if (rec_valid) begin
        if (last_valid >= 0) check(cyc - last_valid == DECIM, "one word set every 40 cycles");
        last_valid = cyc;
        n_valid++;
        if (rec_trig) n_trig_win++;
      end
      for (int k = 0; k < N; k++) ch[k] = 16'($urandom);
      // first half: levels at or below the threshold only; then isolated
      // one-cycle pulses above it, 200 cycles apart
      if (cyc < 4000) trig_adc = (cyc % 3 == 0) ? 14'sd4096 : 14'($urandom_range(0, 4096));
      else trig_adc = (cyc % 200 == 17) ? 14'sd4097 : 14'sd0;
    end
    check(n_valid == 8000 / DECIM, $sformatf("%0d word sets in 8000 cycles", n_valid));
    check(n_trig_win == 20, $sformatf("%0d trigger windows for 20 one-cycle pulses", n_trig_win));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
