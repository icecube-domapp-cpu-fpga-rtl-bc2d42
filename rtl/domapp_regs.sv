// domapp_regs: the CPU register window of the DOMAPP FPGA.
//
// The CPU reaches the FPGA registers through the stripe-to-PLD bridge at
// 0x9000_0000. All registers are 32 bits wide and answer 32-bit accesses
// only; this block sees the byte offset within the window (13 bits, low two
// bits ignored). It holds the control registers, forms the write strobes
// for registers with side effects (LBM pointer reset, calibration CPU
// launch, interrupt enable/ACK, communication tx_head/rx_tail) and for the
// R2R pattern and ATWD pedestal memories, and multiplexes the read data.
//
// Map (offsets): 0x000-0x1FC version words; 0x400 trigger source;
// 0x404 trigger setup (stored only, no function); 0x410 DAQ; 0x420 LBM
// control; 0x424 LBM pointer; 0x430 DOM status; 0x440/0x444 systime LSB/MSB;
// 0x450 LC control; 0x454/0x458 LC cable length up/down; 0x460 calibration
// source control; 0x464 calibration time; 0x468 calibration CPU launch;
// 0x46C/0x470 last flash time; 0x480 rate monitor control; 0x484/0x488
// SPE/MPE rates; 0x4A0 supernova control; 0x4A4 supernova data; 0x4C0
// interrupt enable; 0x4C4 interrupt ACK; 0x4E0/0x4E4 flasher board control
// and status; 0x500-0x524 communication; 0x530/0x534 DOM ID; 0x540
// compression control; 0x560 IceTop control; 0x7F8 PONG; 0x7FC firmware
// debugging; 0xC00-0xFFC R2R pattern (low 8 bits); 0x1000-0x17FC ATWD A and
// 0x1800-0x1FFC ATWD B pedestal patterns (low 10 bits).
//
// The flasher board interface is part of this block: Flasher Board Control
// bit 0 drives the AUX_RESET/PRE_TRIG pin and the ATTN pin reads back as
// Flasher Board Status bit 0.
//
// The register map and field meanings follow the specification. This
// design's own: the bus handshake (a write takes effect at the clock edge
// where `wr` is high; read data is registered and valid, with `rvalid`, one
// clock after `rd`), write-only registers reading back their value, PONG
// and firmware debugging acting as scratch registers, the supernova buffer
// window and undefined offsets reading 0, and the version word values,
// which are parameters.
module domapp_regs
  import domapp_pkg::*;
#(
  parameter logic [15:0] FPGA_TYPE  = 16'h0001,
  parameter logic [31:0] BUILD      = 32'h0000_0001,
  parameter logic [15:0] COMM_CODE_VERSION = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus
  input  logic        wr,
  input  logic        rd,
  input  logic [12:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  // control registers
  output logic [9:0]  trig_src,
  output logic [31:0] trig_setup,
  output daq_reg_t    daq,
  output logic        lbm_rst,
  output lc_reg_t     lc_cfg,
  output logic [31:0] cable_up,
  output logic [31:0] cable_dn,
  output logic [31:0] cal_ctrl,
  output logic [31:0] cal_time,
  output logic        cal_launch_wr,
  output logic [31:0] rate_ctrl,
  output logic [31:0] sn_ctrl,
  output logic        int_en_wr,
  output logic        int_ack_wr,
  output logic        fb_aux_reset,
  input  logic        fb_attn,
  output logic        reboot_req,
  output logic        tx_head_wr,
  output logic        rx_tail_wr,
  output logic [31:0] comm_levels,
  output logic [31:0] comm_thrdly,
  output logic [47:0] dom_id,
  output logic [31:0] compr_ctrl,
  output logic [31:0] icetop_ctrl,
  // memory write strobes (address and data taken from addr/wdata)
  output logic        pat_we,
  output logic        ped_we_a,
  output logic        ped_we_b,
  // status and data for reads
  input  logic [31:0] lbm_ptr,
  input  logic [31:0] dom_status,
  input  logic [47:0] systime,
  input  logic [47:0] cal_last,
  input  logic [15:0] rate_spe,
  input  logic [15:0] rate_mpe,
  input  logic [31:0] sn_data,
  input  logic [5:0]  int_en,
  input  logic [5:0]  int_pending,
  input  logic [31:0] comm_status,
  input  logic [12:0] tx_head,
  input  logic [12:0] tx_tail,
  input  logic [12:0] rx_tail,
  input  logic [12:0] rx_head,
  input  logic [15:0] rx_pkts,
  input  logic [31:0] comm_errors
);
  logic [12:0] a;
  logic [31:0] pong, fw_debug, fb_ctrl, comm_ctrl;
  assign a = {addr[12:2], 2'b00};

  // write strobes without storage
  assign lbm_rst       = wr && a == A_LBM_CTRL && wdata[0];
  assign cal_launch_wr = wr && a == A_CAL_LAUNCH;
  assign int_en_wr     = wr && a == A_INT_EN;
  assign int_ack_wr    = wr && a == A_INT_ACK;
  assign tx_head_wr    = wr && a == A_COMM_TX_HEAD;
  assign rx_tail_wr    = wr && a == A_COMM_RX_TAIL;
  assign pat_we        = wr && a[12:10] == 3'b011;        // 0xC00..0xFFC
  assign ped_we_a      = wr && a[12:11] == 2'b10;         // 0x1000..0x17FC
  assign ped_we_b      = wr && a[12:11] == 2'b11;         // 0x1800..0x1FFC

  assign fb_aux_reset = fb_ctrl[0];
  assign reboot_req   = comm_ctrl[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      trig_src    <= '0;
      trig_setup  <= '0;
      daq         <= '0;
      lc_cfg      <= '0;
      cable_up    <= '0;
      cable_dn    <= '0;
      cal_ctrl    <= '0;
      cal_time    <= '0;
      rate_ctrl   <= '0;
      sn_ctrl     <= '0;
      fb_ctrl     <= '0;
      comm_ctrl   <= '0;
      comm_levels <= '0;
      comm_thrdly <= '0;
      dom_id      <= '0;
      compr_ctrl  <= '0;
      icetop_ctrl <= '0;
      pong        <= '0;
      fw_debug    <= '0;
    end else if (wr) begin
      unique case (a)
        A_TRIG_SRC:     trig_src    <= wdata[9:0];
        A_TRIG_SETUP:   trig_setup  <= wdata;
        A_DAQ:          daq         <= daq_reg_t'(wdata);
        A_LC_CTRL:      lc_cfg      <= lc_reg_t'(wdata);
        A_LC_CABLE_UP:  cable_up    <= wdata;
        A_LC_CABLE_DN:  cable_dn    <= wdata;
        A_CAL_CTRL:     cal_ctrl    <= wdata;
        A_CAL_TIME:     cal_time    <= wdata;
        A_RATE_CTRL:    rate_ctrl   <= wdata;
        A_SN_CTRL:      sn_ctrl     <= wdata;
        A_FB_CTRL:      fb_ctrl     <= wdata;
        A_COMM_CTRL:    comm_ctrl   <= wdata;
        A_COMM_LEVELS:  comm_levels <= wdata;
        A_COMM_THRDLY:  comm_thrdly <= wdata;
        A_DOMID_LSB:    dom_id[31:0]  <= wdata;
        A_DOMID_MSB:    dom_id[47:32] <= wdata[15:0];
        A_COMPR_CTRL:   compr_ctrl  <= wdata;
        A_ICETOP_CTRL:  icetop_ctrl <= wdata;
        A_PONG:         pong        <= wdata;
        A_FW_DEBUG:     fw_debug    <= wdata;
        default: ;
      endcase
    end

  // version words: 0x000 FPGA type, 0x004/0x008 build number LSB/MSB,
  // 0x00C..0x030 component versions (0 = first version), 0x190
  // communications code version
  function automatic logic [31:0] version_word(input logic [12:0] ofs);
    unique case (ofs)
      13'h000: return {16'd0, FPGA_TYPE};
      13'h004: return {16'd0, BUILD[15:0]};
      13'h008: return {16'd0, BUILD[31:16]};
      13'h190: return {16'd0, COMM_CODE_VERSION};
      default: return '0;
    endcase
  endfunction

  logic [31:0] rmux;
  always_comb begin
    rmux = '0;
    if (a <= A_VERSION_HI) rmux = version_word(a);
    else unique case (a)
      A_TRIG_SRC:     rmux = {22'd0, trig_src};
      A_TRIG_SETUP:   rmux = trig_setup;
      A_DAQ:          rmux = daq;
      A_LBM_PTR:      rmux = lbm_ptr;
      A_DOM_STATUS:   rmux = dom_status;
      A_SYSTIME_LSB:  rmux = systime[31:0];
      A_SYSTIME_MSB:  rmux = {16'd0, systime[47:32]};
      A_LC_CTRL:      rmux = lc_cfg;
      A_LC_CABLE_UP:  rmux = cable_up;
      A_LC_CABLE_DN:  rmux = cable_dn;
      A_CAL_CTRL:     rmux = cal_ctrl;
      A_CAL_TIME:     rmux = cal_time;
      A_CAL_LAST_LSB: rmux = cal_last[31:0];
      A_CAL_LAST_MSB: rmux = {16'd0, cal_last[47:32]};
      A_RATE_CTRL:    rmux = rate_ctrl;
      A_RATE_SPE:     rmux = {16'd0, rate_spe};
      A_RATE_MPE:     rmux = {16'd0, rate_mpe};
      A_SN_CTRL:      rmux = sn_ctrl;
      A_SN_DATA:      rmux = sn_data;
      A_INT_EN:       rmux = {26'd0, int_en};
      A_INT_ACK:      rmux = {26'd0, int_pending};
      A_FB_CTRL:      rmux = fb_ctrl;
      A_FB_STATUS:    rmux = {31'd0, fb_attn};
      A_COMM_CTRL:    rmux = comm_ctrl;
      A_COMM_STATUS:  rmux = comm_status;
      A_COMM_TX_HEAD: rmux = {19'd0, tx_head};
      A_COMM_TX_TAIL: rmux = {19'd0, tx_tail};
      A_COMM_RX_TAIL: rmux = {19'd0, rx_tail};
      A_COMM_RX_HEAD: rmux = {19'd0, rx_head};
      A_COMM_RX_PKTS: rmux = {16'd0, rx_pkts};
      A_COMM_ERRCNT:  rmux = comm_errors;
      A_COMM_LEVELS:  rmux = comm_levels;
      A_COMM_THRDLY:  rmux = comm_thrdly;
      A_DOMID_LSB:    rmux = dom_id[31:0];
      A_DOMID_MSB:    rmux = {16'd0, dom_id[47:32]};
      A_COMPR_CTRL:   rmux = compr_ctrl;
      A_ICETOP_CTRL:  rmux = icetop_ctrl;
      A_PONG:         rmux = pong;
      A_FW_DEBUG:     rmux = fw_debug;
      default:        rmux = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd;
      if (rd) rdata <= rmux;
    end

  a_rule: assert property (@(posedge clk) disable iff (!rst_n) !(wr && rd))
    else $error("domapp_regs: read and write in one cycle");
endmodule
