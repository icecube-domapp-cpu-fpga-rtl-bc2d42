// domapp_pkg: constants and types shared by the DOMAPP FPGA blocks.
//
// The register window seen by the CPU through the stripe-to-PLD bridge is
// addressed here by byte offset from the window base (0x9000_0000); every
// register is one 32-bit word, so the low two offset bits are always zero.
// The mode encodings follow the register tables of the interface
// specification (DAQ, LC, LBM, compression, calibration and supernova
// modes). The bus record types for the CPU register port and the look back
// memory write port are this design's own choice.
package domapp_pkg;

  // ---------------------------------------------------------------- clock
  localparam int unsigned CLK_HZ = 40_000_000;   // systime tick = 25 ns

  // ------------------------------------------------------ register offsets
  localparam logic [12:0] A_VERSION_LO   = 13'h0000;  // 0x000..0x1FC
  localparam logic [12:0] A_VERSION_HI   = 13'h01FC;
  localparam logic [12:0] A_TRIG_SRC     = 13'h0400;
  localparam logic [12:0] A_TRIG_SETUP   = 13'h0404;
  localparam logic [12:0] A_DAQ          = 13'h0410;
  localparam logic [12:0] A_LBM_CTRL     = 13'h0420;
  localparam logic [12:0] A_LBM_PTR      = 13'h0424;
  localparam logic [12:0] A_DOM_STATUS   = 13'h0430;
  localparam logic [12:0] A_SYSTIME_LSB  = 13'h0440;
  localparam logic [12:0] A_SYSTIME_MSB  = 13'h0444;
  localparam logic [12:0] A_LC_CTRL      = 13'h0450;
  localparam logic [12:0] A_LC_CABLE_UP  = 13'h0454;
  localparam logic [12:0] A_LC_CABLE_DN  = 13'h0458;
  localparam logic [12:0] A_CAL_CTRL     = 13'h0460;
  localparam logic [12:0] A_CAL_TIME     = 13'h0464;
  localparam logic [12:0] A_CAL_LAUNCH   = 13'h0468;
  localparam logic [12:0] A_CAL_LAST_LSB = 13'h046C;
  localparam logic [12:0] A_CAL_LAST_MSB = 13'h0470;
  localparam logic [12:0] A_RATE_CTRL    = 13'h0480;
  localparam logic [12:0] A_RATE_SPE     = 13'h0484;
  localparam logic [12:0] A_RATE_MPE     = 13'h0488;
  localparam logic [12:0] A_SN_CTRL      = 13'h04A0;
  localparam logic [12:0] A_SN_DATA      = 13'h04A4;
  localparam logic [12:0] A_INT_EN       = 13'h04C0;
  localparam logic [12:0] A_INT_ACK      = 13'h04C4;
  localparam logic [12:0] A_FB_CTRL      = 13'h04E0;
  localparam logic [12:0] A_FB_STATUS    = 13'h04E4;
  localparam logic [12:0] A_COMM_CTRL    = 13'h0500;
  localparam logic [12:0] A_COMM_STATUS  = 13'h0504;
  localparam logic [12:0] A_COMM_TX_HEAD = 13'h0508;
  localparam logic [12:0] A_COMM_TX_TAIL = 13'h050C;
  localparam logic [12:0] A_COMM_RX_TAIL = 13'h0510;
  localparam logic [12:0] A_COMM_RX_HEAD = 13'h0514;
  localparam logic [12:0] A_COMM_RX_PKTS = 13'h0518;
  localparam logic [12:0] A_COMM_ERRCNT  = 13'h051C;
  localparam logic [12:0] A_COMM_LEVELS  = 13'h0520;
  localparam logic [12:0] A_COMM_THRDLY  = 13'h0524;
  localparam logic [12:0] A_DOMID_LSB    = 13'h0530;
  localparam logic [12:0] A_DOMID_MSB    = 13'h0534;
  localparam logic [12:0] A_COMPR_CTRL   = 13'h0540;
  localparam logic [12:0] A_ICETOP_CTRL  = 13'h0560;
  localparam logic [12:0] A_PONG         = 13'h07F8;
  localparam logic [12:0] A_FW_DEBUG     = 13'h07FC;
  // memory windows (base offsets; size in bytes)
  localparam logic [12:0] A_SN_BUF       = 13'h0800;  // 0x800..0xBFC
  localparam logic [12:0] A_R2R_PAT      = 13'h0C00;  // 0xC00..0xFFC, 256 x 8 bit
  localparam logic [12:0] A_PED_A        = 13'h1000;  // 0x1000..0x17FC, 512 x 10 bit
  localparam logic [12:0] A_PED_B        = 13'h1800;  // 0x1800..0x1FFC, 512 x 10 bit

  // ----------------------------------------------------------- interrupts
  localparam int unsigned N_IRQ   = 6;
  localparam int unsigned IRQ_CAL = 0;   // calibration source flashed
  localparam int unsigned IRQ_RATE = 1;  // rate meter update
  localparam int unsigned IRQ_SN  = 2;   // supernova data updated

  // ----------------------------------------------------- trigger sources
  localparam int unsigned TS_SPE     = 0;
  localparam int unsigned TS_MPE     = 1;
  localparam int unsigned TS_CPU     = 2;
  localparam int unsigned TS_FE_PULS = 3;
  localparam int unsigned TS_LED     = 4;
  localparam int unsigned TS_FLASHER = 5;
  localparam int unsigned TS_FE_R2R  = 6;
  localparam int unsigned TS_ATWD_R2R = 7;
  localparam int unsigned TS_LC_UP   = 8;
  localparam int unsigned TS_LC_DOWN = 9;

  // ---------------------------------------------------------------- modes
  typedef enum logic [2:0] {
    DAQ_ATWD_FADC = 3'd0,
    DAQ_FADC_ONLY = 3'd1,
    DAQ_TS_ONLY   = 3'd2
  } daq_mode_e;

  typedef enum logic [2:0] {
    ATWD_NORMAL = 3'd0,
    ATWD_TEST   = 3'd1,
    ATWD_DEBUG  = 3'd2
  } atwd_mode_e;

  typedef enum logic [2:0] {
    LC_OFF    = 3'd0,
    LC_SOFT   = 3'd1,
    LC_HARD   = 3'd2,
    LC_FLABBY = 3'd3
  } lc_mode_e;

  typedef enum logic [2:0] {
    LBM_WRAP = 3'd0,
    LBM_STOP = 3'd1
  } lbm_mode_e;

  typedef enum logic [2:0] {
    CAL_OFF    = 3'd0,
    CAL_REPEAT = 3'd1,
    CAL_TMATCH = 3'd2,
    CAL_CPU    = 3'd3
  } cal_mode_e;

  // DAQ register (offset 0x410), field by field
  typedef struct packed {
    logic [2:0]  rsv31;        // 31..29
    logic        icetop_en;    // 28
    logic        rsv27;        // 27
    logic [2:0]  compr_mode;   // 26..24
    logic        rsv23;        // 23
    logic [2:0]  lbm_mode;     // 22..20
    logic        lc_hb_dis;    // 19
    logic [2:0]  lc_mode;      // 18..16
    logic        rsv15;        // 15
    logic [2:0]  atwd_mode;    // 14..12
    logic        rsv11;        // 11
    logic [2:0]  daq_mode;     // 10..8
    logic [4:0]  rsv7;         // 7..3
    logic        atwd_b_en;    // 2
    logic        atwd_a_en;    // 1
    logic        enable;       // 0
  } daq_reg_t;

  // Local coincidence control register (offset 0x450)
  typedef struct packed {
    logic [1:0]  rsv31;        // 31..30
    logic [5:0]  post_win;     // 29..24
    logic [1:0]  rsv23;        // 23..22
    logic [5:0]  pre_win;      // 21..16
    logic [5:0]  self_win;     // 15..10
    logic [1:0]  self_mode;    // 9..8
    logic        disc_mpe;     // 7
    logic        need_both;    // 6
    logic [1:0]  span;         // 5..4
    logic        rx_down;      // 3
    logic        rx_up;        // 2
    logic        tx_down;      // 1
    logic        tx_up;        // 0
  } lc_reg_t;

  // ------------------------------------------------ look back memory map
  localparam logic [31:0] LBM_BASE       = 32'h0100_0000;
  localparam int unsigned LBM_BYTES      = 8 * 1024 * 1024;
  localparam int unsigned LBM_EVENT_BYTES = 2048;
  localparam logic [15:0] HDR_CONST      = 16'h0001;
  localparam logic [11:0] OFS_FADC       = 12'h010;
  localparam logic [11:0] OFS_ATWD       = 12'h210;
  localparam int unsigned N_FADC         = 256;
  localparam int unsigned N_ATWD_SMP     = 128;
  localparam int unsigned N_ATWD_CH      = 4;

endpackage
