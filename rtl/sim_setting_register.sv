// sim_setting_register: host-writable settings of the cavity simulator.
//
// The host writes one 32-bit word per cycle. Register map (this design's own;
// the system only shows a setting-register block in the simulator):
//   0x00  ADC offset I      0x01  ADC offset Q      (signed 16 bits)
//   0x02  beam current I    0x03  beam current Q    (signed 16 bits)
//   0x04  cavity enable mask (reset value all ones)
//   0x10 + 16*c + k, coefficients of cavity c:
//         k = 0 c_bw, 1 c_in, 2 d0,
//         k = 3+3m ka, 4+3m kb, 5+3m kc of mechanical mode m
// Coefficient scaling is described in cavity_model and mech_mode. All
// coefficients reset to zero.
//
// Timing: a register changes one cycle after the host write.
`timescale 1ns/1ps
module sim_setting_register
  import llrf_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  host_wr_t host,
  output sim_cfg_t cfg
);
  logic [3:0] cav_idx, k;
  assign cav_idx = host.addr[7:4] - 4'd1;
  assign k       = host.addr[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      cfg        <= '0;
      cfg.cav_en <= '1;
    end else if (host.we) begin
      if (host.addr[7:4] == 4'd0) begin
        unique case (host.addr[3:0])
          4'h0: cfg.off_i  <= host.data[IQ_W-1:0];
          4'h1: cfg.off_q  <= host.data[IQ_W-1:0];
          4'h2: cfg.ib_i   <= host.data[IQ_W-1:0];
          4'h3: cfg.ib_q   <= host.data[IQ_W-1:0];
          4'h4: cfg.cav_en <= host.data[N_CH-1:0];
          default: ;
        endcase
      end else if (32'(cav_idx) < N_CH) begin
        if (k == 4'd0)      cfg.cav[cav_idx[$clog2(N_CH)-1:0]].c_bw <= host.data[CW_CAV-1:0];
        else if (k == 4'd1) cfg.cav[cav_idx[$clog2(N_CH)-1:0]].c_in <= host.data[CW_CAV-1:0];
        else if (k == 4'd2) cfg.cav[cav_idx[$clog2(N_CH)-1:0]].d0   <= host.data[DW_CAV-1:0];
        else begin
          for (int m = 0; m < N_MODES; m++) begin
            if (32'(k) == 3 + 3*m) cfg.cav[cav_idx[$clog2(N_CH)-1:0]].mode[m].ka <= host.data[KW-1:0];
            if (32'(k) == 4 + 3*m) cfg.cav[cav_idx[$clog2(N_CH)-1:0]].mode[m].kb <= host.data[KW-1:0];
            if (32'(k) == 5 + 3*m) cfg.cav[cav_idx[$clog2(N_CH)-1:0]].mode[m].kc <= host.data[KW-1:0];
          end
        end
      end
    end
  end
endmodule
