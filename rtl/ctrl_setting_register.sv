// ctrl_setting_register: host-writable settings of the cavity controller.
//
// The host writes one 32-bit word per cycle (host.we, host.addr, host.data).
// Register map (this design's own; the system only shows a setting-register
// block that drives the table write port and the controller's settings):
//   0x00  bit0 fb_en (PI feedback), bit1 ff_en (feed-forward), bit2 dac_en
//   0x01  Kp, signed 18 bits        0x02  Ki, signed 18 bits
//   0x03  pulse length in 1 us table steps (reset value 1500)
//   0x04  channel enable mask of the vector sum (reset value all ones)
//   0x05  table address for the next table write
//   0x06  set-point entry: I in data[15:0], Q in data[31:16]
//   0x07  I feed-forward entry      0x08  Q feed-forward entry
//   0x10+2c, 0x11+2c  g*cos(t), g*sin(t) of channel c (reset 1.0 and 0)
// A write to 0x06..0x08 produces a one-cycle strobe on the table write port
// (Address_w, Data_w, Enable_sp / Enable_ffi / Enable_ffq) and then advances
// the table address by one, so a waveform loads with consecutive writes.
//
// Timing: a register is updated, and a table strobe issued, one cycle after
// the host write.
`timescale 1ns/1ps
module ctrl_setting_register
  import llrf_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  host_wr_t  host,
  output ctrl_cfg_t cfg,
  output tbl_wr_t   tbl
);
  logic [TBL_AW-1:0] waddr;

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg.fb_en     <= 1'b0;
      cfg.ff_en     <= 1'b0;
      cfg.dac_en    <= 1'b0;
      cfg.kp        <= '0;
      cfg.ki        <= '0;
      cfg.pulse_len <= TBL_AW'(1500);
      cfg.ch_en     <= '1;
      for (int c = 0; c < N_CH; c++) begin
        cfg.gcos[c] <= 18'sd65536;
        cfg.gsin[c] <= '0;
      end
      tbl   <= '0;
      waddr <= '0;
    end else begin
      tbl.en_sp  <= 1'b0;
      tbl.en_ffi <= 1'b0;
      tbl.en_ffq <= 1'b0;
      if (host.we) begin
        unique casez (host.addr)
          8'h00: begin
            cfg.fb_en  <= host.data[0];
            cfg.ff_en  <= host.data[1];
            cfg.dac_en <= host.data[2];
          end
          8'h01: cfg.kp        <= host.data[17:0];
          8'h02: cfg.ki        <= host.data[17:0];
          8'h03: cfg.pulse_len <= host.data[TBL_AW-1:0];
          8'h04: cfg.ch_en     <= host.data[N_CH-1:0];
          8'h05: waddr         <= host.data[TBL_AW-1:0];
          8'h06, 8'h07, 8'h08: begin
            tbl.addr   <= waddr;
            tbl.data   <= host.data;
            tbl.en_sp  <= (host.addr == 8'h06);
            tbl.en_ffi <= (host.addr == 8'h07);
            tbl.en_ffq <= (host.addr == 8'h08);
            waddr      <= waddr + 1'b1;
          end
          8'b0001_????: begin
            if (host.addr[0]) cfg.gsin[host.addr[3:1]] <= host.data[17:0];
            else              cfg.gcos[host.addr[3:1]] <= host.data[17:0];
          end
          default: ;
        endcase
      end
    end
  end
endmodule
