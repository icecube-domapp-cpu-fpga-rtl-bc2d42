// Testbench for domapp_regs: write/read-back of the control registers,
// decoding into the typed DAQ and LC fields, read-only status inputs at
// their offsets, the one-clock read latency, write strobes with side effects
// and the memory-window strobes.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_domapp_regs;
  import domapp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0, rvalid;
  logic [12:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [9:0] trig_src;
  logic [31:0] trig_setup, cable_up, cable_dn, cal_ctrl, cal_time, rate_ctrl, sn_ctrl;
  logic [31:0] comm_levels, comm_thrdly, compr_ctrl, icetop_ctrl;
  daq_reg_t daq;
  lc_reg_t lc_cfg;
  logic lbm_rst, cal_launch_wr, int_en_wr, int_ack_wr, fb_aux_reset, reboot_req;
  logic tx_head_wr, rx_tail_wr, pat_we, ped_we_a, ped_we_b;
  logic [47:0] dom_id;
  logic fb_attn = 1;
  logic [47:0] systime = 48'h1234_5678_9ABC, cal_last = 48'hAAAA_BBBB_CCCC;
  always #12.5 clk = ~clk;
  domapp_regs dut (.clk, .rst_n, .wr, .rd, .addr, .wdata, .rdata, .rvalid,
    .trig_src, .trig_setup, .daq, .lbm_rst, .lc_cfg, .cable_up, .cable_dn, .cal_ctrl, .cal_time,
    .cal_launch_wr, .rate_ctrl, .sn_ctrl, .int_en_wr, .int_ack_wr, .fb_aux_reset, .fb_attn,
    .reboot_req, .tx_head_wr, .rx_tail_wr, .comm_levels, .comm_thrdly, .dom_id, .compr_ctrl,
    .icetop_ctrl, .pat_we, .ped_we_a, .ped_we_b,
    .lbm_ptr(32'h0000_4800), .dom_status(32'h4000_0101), .systime, .cal_last,
    .rate_spe(16'd321), .rate_mpe(16'd12), .sn_data(32'hBEEF_1234), .int_en(6'h05),
    .int_pending(6'h04), .comm_status(32'h45), .tx_head(13'd7), .tx_tail(13'd3),
    .rx_tail(13'd9), .rx_head(13'd11), .rx_pkts(16'd2), .comm_errors(32'hE0));
  initial begin #1_000_000; failures++; `FINISH end

  task automatic wreg(input logic [12:0] a, input logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask
  task automatic rreg(input logic [12:0] a, output logic [31:0] d);
    @(negedge clk); rd = 1; addr = a;
    @(negedge clk); rd = 0;
    `CHECK(rvalid, "rvalid one clock after rd")
    d = rdata;
  endtask
  logic [31:0] d;
  logic [12:0] rw_regs [14] = '{A_TRIG_SETUP, A_DAQ, A_LC_CTRL, A_LC_CABLE_UP, A_LC_CABLE_DN,
       A_CAL_CTRL, A_CAL_TIME, A_RATE_CTRL, A_SN_CTRL, A_COMM_LEVELS, A_COMM_THRDLY,
       A_DOMID_LSB, A_PONG, A_FW_DEBUG};
  logic [31:0] vals [14];
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (rw_regs[i]) begin vals[i] = $urandom; wreg(rw_regs[i], vals[i]); end
    foreach (rw_regs[i]) begin
      rreg(rw_regs[i], d);
      `CHECK(d == vals[i], $sformatf("reg %h read %h wrote %h", rw_regs[i], d, vals[i]))
    end
    wreg(A_DAQ, 32'h1125_3207);
    `CHECK(daq.enable && daq.atwd_a_en && daq.atwd_b_en && daq.daq_mode == 3'd2 &&
           daq.atwd_mode == 3'd3 && daq.lc_mode == 3'd5 && daq.lbm_mode == 3'd2 &&
           daq.compr_mode == 3'd1 && daq.icetop_en, "DAQ fields")
    wreg(A_LC_CTRL, 32'h2A15_A4E5);
    `CHECK(lc_cfg.tx_up && !lc_cfg.tx_down && lc_cfg.rx_up && lc_cfg.span == 2'd2 &&
           lc_cfg.need_both && lc_cfg.disc_mpe && lc_cfg.self_mode == 2'd0 &&
           lc_cfg.self_win == 6'h29 && lc_cfg.pre_win == 6'h15 && lc_cfg.post_win == 6'h2A, "LC fields")
    wreg(A_TRIG_SRC, 32'hFFFF_FFFF);
    rreg(A_TRIG_SRC, d);  `CHECK(d == 32'h3FF && trig_src == 10'h3FF, "trigger source is 10 bits")
    wreg(A_DOMID_MSB, 32'hFFFF_1234);
    `CHECK(dom_id[47:32] == 16'h1234, "DOM ID MSB")
    rreg(A_LBM_PTR, d);      `CHECK(d == 32'h4800, "LBM pointer")
    rreg(A_DOM_STATUS, d);   `CHECK(d == 32'h4000_0101, "DOM status")
    rreg(A_SYSTIME_LSB, d);  `CHECK(d == 32'h5678_9ABC, "systime LSB")
    rreg(A_SYSTIME_MSB, d);  `CHECK(d == 32'h1234, "systime MSB")
    rreg(A_CAL_LAST_LSB, d); `CHECK(d == 32'hBBBB_CCCC, "last flash LSB")
    rreg(A_CAL_LAST_MSB, d); `CHECK(d == 32'hAAAA, "last flash MSB")
    rreg(A_RATE_SPE, d);     `CHECK(d == 321, "SPE rate")
    rreg(A_RATE_MPE, d);     `CHECK(d == 12, "MPE rate")
    rreg(A_SN_DATA, d);      `CHECK(d == 32'hBEEF_1234, "supernova data")
    rreg(A_INT_ACK, d);      `CHECK(d == 4, "pending interrupts")
    rreg(A_INT_EN, d);       `CHECK(d == 5, "interrupt enable")
    rreg(A_FB_STATUS, d);    `CHECK(d == 1, "flasher ATTN")
    rreg(A_COMM_STATUS, d);  `CHECK(d == 32'h45, "comm status")
    rreg(A_COMM_TX_TAIL, d); `CHECK(d == 3, "tx tail")
    rreg(A_COMM_RX_HEAD, d); `CHECK(d == 11, "rx head")
    rreg(A_COMM_RX_PKTS, d); `CHECK(d == 2, "rx packets")
    rreg(A_COMM_ERRCNT, d);  `CHECK(d == 32'hE0, "error counters")
    rreg(13'h0000, d);       `CHECK(d == 32'h0001, "FPGA type")
    rreg(13'h0004, d);       `CHECK(d == 32'h0001, "build LSB")
    rreg(A_SN_BUF, d);       `CHECK(d == 0, "unbuilt window reads 0")
    // flasher board and communication control bits
    wreg(A_FB_CTRL, 1);      `CHECK(fb_aux_reset, "AUX_RESET pin")
    wreg(A_COMM_CTRL, 1);    `CHECK(reboot_req, "reboot request")
    // strobes, sampled while the write is on the bus
    @(negedge clk); wr = 1; addr = A_LBM_CTRL; wdata = 1; #1 `CHECK(lbm_rst, "LBM reset strobe")
    wdata = 0; #1 `CHECK(!lbm_rst, "LBM control bit 0 only")
    addr = A_CAL_LAUNCH; #1 `CHECK(cal_launch_wr, "CPU launch strobe")
    addr = A_INT_EN;     #1 `CHECK(int_en_wr && !int_ack_wr, "interrupt enable strobe")
    addr = A_INT_ACK;    #1 `CHECK(int_ack_wr && !int_en_wr, "interrupt ACK strobe")
    addr = A_COMM_TX_HEAD; #1 `CHECK(tx_head_wr, "tx_head strobe")
    addr = A_COMM_RX_TAIL; #1 `CHECK(rx_tail_wr, "rx_tail strobe")
    addr = 13'h0C00;     #1 `CHECK(pat_we && !ped_we_a && !ped_we_b, "R2R window start")
    addr = 13'h0FFC;     #1 `CHECK(pat_we, "R2R window end")
    addr = 13'h1000;     #1 `CHECK(ped_we_a && !ped_we_b && !pat_we, "pedestal A start")
    addr = 13'h17FC;     #1 `CHECK(ped_we_a, "pedestal A end")
    addr = 13'h1800;     #1 `CHECK(ped_we_b && !ped_we_a, "pedestal B start")
    addr = 13'h0BFC;     #1 `CHECK(!pat_we && !ped_we_a && !ped_we_b, "supernova window is not a memory write")
    @(negedge clk) wr = 0;
    `FINISH
  end
endmodule
