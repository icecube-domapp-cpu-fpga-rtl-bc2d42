// domapp_top: the DOMAPP FPGA, the programmable-logic half of the DOM main
// board's Excalibur device, seen from its CPU interface.
//
// The FPGA takes the PMT discriminator and local coincidence (LC) signals,
// launches the two ATWD digitizers (A and B, used alternately), formats
// each digitized event with timestamp and trigger information and writes it
// by DMA into the look back memory (LBM) in the CPU's SDRAM. Around this
// data path sit the calibration sources (pulser, LED, flasher board, R2R
// ladders), two discriminator rate meters, the supernova meter, the
// interrupt sources and the bookkeeping of the communication ring buffers.
// The CPU controls everything through the register window (domapp_regs).
//
//   disc/LC pins -> pulse_sync -> trigger_ctrl -> ATWD launch pins
//                              \-> lc_unit ----\
//   digitizer sample stream ------------------> event_builder -> LBM port
//   calib_ctrl (flash outputs, forced launches) -> trigger_ctrl
//   rate_monitor x2, supernova_meter, calib_ctrl -> interrupt_ctrl -> irq
//   comm_dpm_ctrl <-> communication engine pins
//
// External parts are reached through ports: the CPU register bus (the
// stripe-to-PLD bridge), the LBM write port (the PLD-to-stripe bridge), the
// ATWD/FADC front end (launch pins and a valid/ready sample stream), the
// calibration hardware, the flasher board and the communication engine.
//
// DOM status word: bit 0/8 ATWD A/B busy, 16/17 bus error and slave bus
// error from the LBM port, 18/19 the same latched (until reset), 20
// transferring event data to the LBM, 24/25 SPE/MPE discriminator level,
// 30 the 5 MHz toggle of the 40 MHz clock. Bits 1, 2, 9, 10, 21, 29 and 31
// read 0: the FADC busy and buffer full flags belong to the digitizer front
// end, compression is not built, and this design has a single clock.
//
// Parameters scale the rate meter gate, the supernova gate and the LBM size
// for simulation; their defaults are the specification's values.
module domapp_top
  import domapp_pkg::*;
#(
  parameter int unsigned RATE_GATE    = 40_000_000,
  parameter int unsigned SN_GATE_BITS = 16,
  parameter int unsigned LBM_SIZE     = 8 * 1024 * 1024
) (
  input  logic        clk,            // 40 MHz
  input  logic        rst_n,
  // CPU register bus
  input  logic        cpu_wr,
  input  logic        cpu_rd,
  input  logic [12:0] cpu_addr,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_rvalid,
  output logic [5:0]  irq,
  // discriminators and local coincidence
  input  logic        disc_spe_in,
  input  logic        disc_mpe_in,
  input  logic        lc_rx_up_in,
  input  logic        lc_rx_down_in,
  output logic        lc_tx_up,
  output logic        lc_tx_down,
  // ATWD / FADC front end
  output logic        atwd_a_launch,
  output logic        atwd_b_launch,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        s_atwd,
  input  logic [9:0]  s_data,
  // look back memory write port
  output logic        lbm_valid,
  input  logic        lbm_ready,
  output logic [31:0] lbm_addr,
  output logic [31:0] lbm_wdata,
  input  logic        ahb_bus_error,
  input  logic        ahb_slave_err,
  // calibration sources
  output logic        fe_pulser,
  output logic        led_flash,
  output logic        flasher_trig,
  output logic [7:0]  atwd_r2r,
  output logic [3:0]  fe_pulser_n,
  output logic [3:0]  fe_pulser_p,
  // flasher board
  output logic        fb_aux_reset,
  input  logic        fb_attn,
  // communication engine
  output logic        comm_reboot_req,
  output logic        comm_tx_msg_ready,
  output logic [12:0] comm_tx_head,
  output logic [12:0] comm_rx_tail,
  input  logic [12:0] comm_tx_tail,
  input  logic        comm_pkt_sent,
  input  logic [12:0] comm_rx_head,
  input  logic        comm_pkt_rcvd,
  input  logic        comm_reboot_granted,
  input  logic        comm_reset_rcvd,
  input  logic        comm_avail,
  input  logic [31:0] comm_errors,
  output logic [31:0] comm_levels,
  output logic [31:0] comm_thrdly,
  output logic [47:0] dom_id,
  // settings for the parts not built here (compression, IceTop)
  output logic [31:0] compr_ctrl,
  output logic [31:0] icetop_ctrl,
  output logic [2:0]  compr_mode
);
  // ------------------------------------------------------------- signals
  logic [47:0] systime;
  logic        tgl_5mhz;
  logic        spe_lvl, spe, mpe_lvl, mpe, lcu_lvl, lcu, lcd_lvl, lcd;

  logic [9:0]  trig_src;
  logic [31:0] trig_setup;
  daq_reg_t    daq;
  lc_reg_t     lc_cfg;
  logic        lbm_rst, cal_launch_wr, int_en_wr, int_ack_wr;
  logic        tx_head_wr, rx_tail_wr, pat_we, ped_we_a, ped_we_b;
  logic [31:0] cable_up, cable_dn, cal_ctrl, cal_time, rate_ctrl, sn_ctrl;
  logic [31:0] lbm_ptr, dom_status, sn_data, comm_status;
  logic [47:0] cal_last;
  logic [15:0] rate_spe, rate_mpe, rx_pkts, tx_msgs;
  logic        upd_spe, upd_mpe, sn_upd, cal_irq;
  logic [5:0]  int_en, int_pend, int_src;

  logic        cal_launch, r2r_active;
  logic [5:0]  cal_src;
  logic [15:0] ev_trig;
  logic        ev_is_cal, dropped;
  logic        busy_a, busy_b, xfer, ev_kept, ev_dropped;
  logic        lc_done, lc_up, lc_down, lc_self, lc_ok;
  logic        err_l, slv_l;

  // ------------------------------------------------------- time and pins
  systime_counter u_systime (.clk, .rst_n, .systime, .tgl_5mhz);

  pulse_sync u_sync_spe (.clk, .rst_n, .din(disc_spe_in),   .level(spe_lvl), .rise(spe));
  pulse_sync u_sync_mpe (.clk, .rst_n, .din(disc_mpe_in),   .level(mpe_lvl), .rise(mpe));
  pulse_sync u_sync_lcu (.clk, .rst_n, .din(lc_rx_up_in),   .level(lcu_lvl), .rise(lcu));
  pulse_sync u_sync_lcd (.clk, .rst_n, .din(lc_rx_down_in), .level(lcd_lvl), .rise(lcd));

  // ------------------------------------------------------------ registers
  domapp_regs u_regs (
    .clk, .rst_n,
    .wr(cpu_wr), .rd(cpu_rd), .addr(cpu_addr), .wdata(cpu_wdata),
    .rdata(cpu_rdata), .rvalid(cpu_rvalid),
    .trig_src, .trig_setup, .daq, .lbm_rst, .lc_cfg, .cable_up, .cable_dn,
    .cal_ctrl, .cal_time, .cal_launch_wr, .rate_ctrl, .sn_ctrl,
    .int_en_wr, .int_ack_wr, .fb_aux_reset, .fb_attn,
    .reboot_req(comm_reboot_req), .tx_head_wr, .rx_tail_wr,
    .comm_levels, .comm_thrdly, .dom_id, .compr_ctrl, .icetop_ctrl,
    .pat_we, .ped_we_a, .ped_we_b,
    .lbm_ptr, .dom_status, .systime, .cal_last, .rate_spe, .rate_mpe,
    .sn_data, .int_en, .int_pending(int_pend), .comm_status,
    .tx_head(comm_tx_head), .tx_tail(comm_tx_tail), .rx_tail(comm_rx_tail),
    .rx_head(comm_rx_head), .rx_pkts, .comm_errors);

  assign compr_mode = daq.compr_mode;

  // ------------------------------------------------------- calibration
  calib_ctrl u_calib (
    .clk, .rst_n, .systime, .ctrl(cal_ctrl), .cal_time,
    .cpu_launch_wr(cal_launch_wr), .cpu_launch_data(cpu_wdata[7:0]),
    .pat_we, .pat_addr(cpu_addr[9:2]), .pat_wdata(cpu_wdata[7:0]),
    .fe_pulser, .led(led_flash), .flasher(flasher_trig),
    .atwd_r2r, .fe_pulser_n, .fe_pulser_p, .r2r_active,
    .atwd_launch(cal_launch), .launch_src(cal_src),
    .last_flash(cal_last), .irq(cal_irq));

  // ---------------------------------------------------------- triggering
  trigger_ctrl u_trig (
    .clk, .rst_n, .trig_src, .daq, .disc_spe(spe), .disc_mpe(mpe),
    .cal_launch, .cal_src, .lc_rx_up(lcu && lc_cfg.rx_up),
    .lc_rx_down(lcd && lc_cfg.rx_down), .busy_a, .busy_b,
    .launch_a(atwd_a_launch), .launch_b(atwd_b_launch),
    .ev_trig, .ev_is_cal, .dropped);

  lc_unit u_lc (
    .clk, .rst_n, .cfg(lc_cfg), .cable_up, .cable_dn,
    .disc_spe(spe), .disc_mpe(mpe), .launch(atwd_a_launch || atwd_b_launch),
    .rx_up(lcu), .rx_down(lcd), .tx_up(lc_tx_up), .tx_down(lc_tx_down),
    .done(lc_done), .got_up(lc_up), .got_down(lc_down), .self_hit(lc_self),
    .lc_ok);

  // ------------------------------------------------------ event building
  event_builder #(.LBM_SIZE(LBM_SIZE)) u_evb (
    .clk, .rst_n, .systime, .daq, .lbm_rst,
    .launch_a(atwd_a_launch), .launch_b(atwd_b_launch), .ev_trig, .ev_is_cal,
    .lc_done, .lc_up, .lc_down, .lc_ok,
    .ped_we_a, .ped_we_b, .ped_waddr(cpu_addr[10:2]), .ped_wdata(cpu_wdata[9:0]),
    .s_valid, .s_ready, .s_atwd, .s_data,
    .m_valid(lbm_valid), .m_ready(lbm_ready), .m_addr(lbm_addr), .m_wdata(lbm_wdata),
    .lbm_ptr, .busy_a, .busy_b, .xfer, .ev_kept, .ev_dropped);

  // ------------------------------------------------------------ monitors
  rate_monitor #(.GATE_CYCLES(RATE_GATE)) u_rate_spe (
    .clk, .rst_n, .enable(rate_ctrl[0]), .deadtime(rate_ctrl[25:16]),
    .hit(spe), .rate(rate_spe), .update(upd_spe));
  rate_monitor #(.GATE_CYCLES(RATE_GATE)) u_rate_mpe (
    .clk, .rst_n, .enable(rate_ctrl[1]), .deadtime(rate_ctrl[25:16]),
    .hit(mpe), .rate(rate_mpe), .update(upd_mpe));

  supernova_meter #(.GATE_BITS(SN_GATE_BITS)) u_sn (
    .clk, .rst_n, .systime, .enable(sn_ctrl[1:0]), .deadtime(sn_ctrl[22:16]),
    .hit_spe(spe), .hit_mpe(mpe), .data(sn_data), .update(sn_upd));

  // ---------------------------------------------------------- interrupts
  always_comb begin
    int_src = '0;
    int_src[IRQ_CAL]  = cal_irq;
    int_src[IRQ_RATE] = upd_spe || upd_mpe;
    int_src[IRQ_SN]   = sn_upd;
  end

  interrupt_ctrl #(.N(N_IRQ)) u_irq (
    .clk, .rst_n, .src(int_src),
    .en_wr(int_en_wr), .en_wdata(cpu_wdata[5:0]),
    .ack_wr(int_ack_wr), .ack_wdata(cpu_wdata[5:0]),
    .enable(int_en), .pending(int_pend), .irq);

  // ------------------------------------------------------- communication
  comm_dpm_ctrl u_comm (
    .clk, .rst_n,
    .tx_head_wr, .tx_head_wdata(cpu_wdata[12:0]),
    .rx_tail_wr, .rx_tail_wdata(cpu_wdata[12:0]),
    .tx_head(comm_tx_head), .rx_tail(comm_rx_tail), .rx_pkts, .tx_msgs,
    .status(comm_status), .tx_msg_ready(comm_tx_msg_ready),
    .tx_tail(comm_tx_tail), .pkt_sent(comm_pkt_sent),
    .rx_head(comm_rx_head), .pkt_rcvd(comm_pkt_rcvd),
    .reboot_granted(comm_reboot_granted), .comm_reset_rcvd(comm_reset_rcvd),
    .comm_avail);

  // ---------------------------------------------------------- DOM status
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err_l <= 1'b0;
      slv_l <= 1'b0;
    end else begin
      if (ahb_bus_error) err_l <= 1'b1;
      if (ahb_slave_err) slv_l <= 1'b1;
    end

  always_comb begin
    dom_status     = '0;
    dom_status[0]  = busy_a;
    dom_status[8]  = busy_b;
    dom_status[16] = ahb_bus_error;
    dom_status[17] = ahb_slave_err;
    dom_status[18] = err_l;
    dom_status[19] = slv_l;
    dom_status[20] = xfer;
    dom_status[24] = spe_lvl;
    dom_status[25] = mpe_lvl;
    dom_status[30] = tgl_5mhz;
  end
endmodule
