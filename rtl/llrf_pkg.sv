// llrf_pkg: widths, constants and shared types of the digital LLRF system.
//
// Both FPGA designs of the system (the cavity controller and the real-time
// cavity simulator) sample and drive 14-bit converters at 40 MHz, with a
// 10 MHz IF, so four samples make one IF period. Up to eight cavity channels
// are handled by one board. Those numbers follow the system description; the
// internal word widths, the host write bundle and the coefficient formats are
// this design's own choices and are documented where they are used.
`timescale 1ns/1ps
package llrf_pkg;

  // Converters and channel count
  localparam int ADC_W   = 14;            // converter resolution
  localparam int DAC_W   = 14;
  localparam int N_CH    = 8;             // cavities per board

  // Internal base-band word and vector-sum width
  localparam int IQ_W    = 16;
  localparam int VS_W    = IQ_W + $clog2(N_CH);   // 19 bits for eight channels

  // Pulse tables: one entry per microsecond (40 clock cycles at 40 MHz)
  localparam int TBL_DEPTH = 2048;
  localparam int TBL_AW    = $clog2(TBL_DEPTH);
  localparam int TICK_CYCLES = 40;

  // Simulator waveform-recorder feed: I/Q of four cavities plus the drive
  // I/Q, one sample per microsecond
  localparam int N_REC     = 10;
  localparam int REC_DECIM = 40;

  // Host register bus: one write per cycle, no read-back
  localparam int HOST_AW = 8;
  localparam int HOST_DW = 32;

  typedef struct packed {
    logic               we;
    logic [HOST_AW-1:0] addr;
    logic [HOST_DW-1:0] data;
  } host_wr_t;

  // Cavity model coefficients (see cavity_model and mech_mode for scaling)
  localparam int N_MODES = 2;             // mechanical modes per cavity
  localparam int KW      = 25;            // mechanical coefficient width
  localparam int CW_CAV  = 18;            // electrical coefficient width
  localparam int DW_CAV  = 24;            // static detuning width

  typedef struct packed {
    logic signed [KW-1:0] ka;   // (2*pi*f_m*dt)^2 * 2^40
    logic signed [KW-1:0] kb;   // (2*pi*f_m/Q_m) * dt * 2^40
    logic signed [KW-1:0] kc;   // Lorentz drive per unit V^2
  } mode_coef_t;

  typedef struct packed {
    logic signed [CW_CAV-1:0] c_bw;   // w_1/2 * dt * 2^24
    logic signed [CW_CAV-1:0] c_in;   // R_L * w_1/2 * dt * 2^24 (normalised)
    logic signed [DW_CAV-1:0] d0;     // static detuning, dw * dt * 2^24
    mode_coef_t [N_MODES-1:0] mode;
  } cav_coef_t;

  // Controller configuration produced by its setting register
  typedef struct packed {
    logic                     fb_en;
    logic                     ff_en;
    logic                     dac_en;
    logic signed [17:0]       kp;
    logic signed [17:0]       ki;
    logic [TBL_AW-1:0]        pulse_len;
    logic [N_CH-1:0]          ch_en;
    logic signed [N_CH-1:0][17:0] gcos;
    logic signed [N_CH-1:0][17:0] gsin;
  } ctrl_cfg_t;

  // Table write port (Address_w, Data_w, Enable_sp, Enable_ffi, Enable_ffq)
  typedef struct packed {
    logic [TBL_AW-1:0] addr;
    logic [31:0]       data;
    logic              en_sp;
    logic              en_ffi;
    logic              en_ffq;
  } tbl_wr_t;

  // Simulator configuration produced by its setting register
  typedef struct packed {
    logic signed [IQ_W-1:0]   off_i;
    logic signed [IQ_W-1:0]   off_q;
    logic signed [IQ_W-1:0]   ib_i;
    logic signed [IQ_W-1:0]   ib_q;
    logic [N_CH-1:0]          cav_en;
    cav_coef_t [N_CH-1:0]     cav;
  } sim_cfg_t;

endpackage
