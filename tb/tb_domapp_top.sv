// End-to-end testbench for domapp_top (rate gate 2000 clocks, supernova
// slots 256 clocks, LBM of 4 blocks; see the parameters below).
//
// A CPU model programs the FPGA over the register bus and services the
// interrupts; a front-end model answers every ATWD launch with a stream of
// 768 samples; an LBM model accepts the DMA writes. The test walks through
// the mechanisms of the design and counts each one: events written, ATWD
// A/B ping-pong, channel selection on overflow, LBM wrap, LC-coincident
// events, events dropped in HARD LC mode, LC sent to a neighbour,
// calibration flash with forced launch and R2R playback, heart-beat
// calibration events, triggers dropped with both ATWDs busy, rate meter and
// supernova interrupts, interrupt ACK, stop-when-full back-pressure and the
// pointer reset, and communication packet counting. Each written event's
// header and FADC data are checked against what the models sent.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_domapp_top;
  import domapp_pkg::*;
  localparam int unsigned LSZ = 8192;
  localparam int unsigned GATE = 2000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cpu_wr = 0, cpu_rd = 0, cpu_rvalid;
  logic [12:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [5:0] irq;
  logic disc_spe_in = 0, disc_mpe_in = 0, lc_rx_up_in = 0, lc_rx_down_in = 0, lc_tx_up, lc_tx_down;
  logic atwd_a_launch, atwd_b_launch, s_valid = 0, s_ready, s_atwd = 0;
  logic [9:0] s_data = 0;
  logic lbm_valid, lbm_ready = 1;
  logic [31:0] lbm_addr, lbm_wdata;
  logic fe_pulser, led_flash, flasher_trig, fb_aux_reset, comm_reboot_req, comm_tx_msg_ready;
  logic [7:0] atwd_r2r;
  logic [3:0] fe_pulser_n, fe_pulser_p;
  logic [12:0] comm_tx_head, comm_rx_tail;
  logic comm_pkt_rcvd = 0;
  logic [31:0] comm_levels, comm_thrdly, compr_ctrl, icetop_ctrl;
  logic [47:0] dom_id;
  logic [2:0] compr_mode;

  always #12.5 clk = ~clk;

  domapp_top #(.RATE_GATE(GATE), .SN_GATE_BITS(8), .LBM_SIZE(LSZ)) dut (
    .clk, .rst_n, .cpu_wr, .cpu_rd, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .irq,
    .disc_spe_in, .disc_mpe_in, .lc_rx_up_in, .lc_rx_down_in, .lc_tx_up, .lc_tx_down,
    .atwd_a_launch, .atwd_b_launch, .s_valid, .s_ready, .s_atwd, .s_data,
    .lbm_valid, .lbm_ready, .lbm_addr, .lbm_wdata, .ahb_bus_error(1'b0), .ahb_slave_err(1'b0),
    .fe_pulser, .led_flash, .flasher_trig, .atwd_r2r, .fe_pulser_n, .fe_pulser_p,
    .fb_aux_reset, .fb_attn(1'b0), .comm_reboot_req, .comm_tx_msg_ready,
    .comm_tx_head, .comm_rx_tail, .comm_tx_tail(13'd0), .comm_pkt_sent(1'b0),
    .comm_rx_head(13'd0), .comm_pkt_rcvd, .comm_reboot_granted(1'b0), .comm_reset_rcvd(1'b0),
    .comm_avail(1'b1), .comm_errors(32'd0), .comm_levels, .comm_thrdly, .dom_id,
    .compr_ctrl, .icetop_ctrl, .compr_mode);

  initial begin #20_000_000; failures++; $display("watchdog"); `FINISH end

  // ----------------------------------------------------------- counters
  int n_kept, n_dropped_lc, n_a, n_b, n_ovf, n_lc_ev, n_cal_ev, n_wrap, n_trig_drop;
  int n_tx_lc, n_flash, n_r2r, n_rate_irq, n_sn_irq, n_stall, n_hits, rate_sum, n_launch;

  // ------------------------------------------------------------ CPU bus
  semaphore bus = new(1);
  task automatic wreg(input logic [12:0] a, input logic [31:0] d);
    bus.get(1);
    @(negedge clk); cpu_wr = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_wr = 0;
    bus.put(1);
  endtask
  task automatic rreg(input logic [12:0] a, output logic [31:0] d);
    bus.get(1);
    @(negedge clk); cpu_rd = 1; cpu_addr = a;
    @(negedge clk); cpu_rd = 0; d = cpu_rdata;
    bus.put(1);
  endtask

  // interrupt service: rate meter and supernova
  logic [31:0] pend, v;
  initial forever begin
    @(posedge clk);
    if (irq != 0 && rst_n) begin
      rreg(A_INT_ACK, pend);
      if (pend[IRQ_RATE]) begin rreg(A_RATE_SPE, v); rate_sum += int'(v); n_rate_irq++; end
      if (pend[IRQ_SN]) begin
        rreg(A_SN_DATA, v); n_sn_irq++;
        for (int s = 0; s < 4; s++) `CHECK(v[s*4 +: 4] <= 1, "supernova dead time: one hit per slot")
      end
      if (pend[IRQ_CAL]) n_flash++;
      wreg(A_INT_ACK, pend);
      rreg(A_INT_ACK, v);
      `CHECK((v & pend) == 0 || irq != 0, "ACK clears the served interrupts")
    end
  end

  // --------------------------------------------------- front-end model
  bit   q_b [$];
  int   ovf_next = 0;
  logic [9:0] sent [$];            // FADC samples of finished streams, 256 per event
  always @(posedge clk) if (rst_n) begin
    if (atwd_a_launch) begin q_b.push_back(0); n_a++; n_launch++; end
    if (atwd_b_launch) begin q_b.push_back(1); n_b++; n_launch++; end
    if (dut.u_trig.dropped) n_trig_drop++;
    if (lc_tx_up) n_tx_lc++;
    if (atwd_r2r != 0) n_r2r++;
    if (s_valid && !s_ready && dut.u_evb.state == 0) n_stall++;
  end
  initial forever begin
    bit b;
    wait (q_b.size() != 0);
    b = q_b.pop_front();
    repeat (100) @(negedge clk);
    for (int i = 0; i < 768; i++) begin
      s_valid = 1; s_atwd = b;
      s_data = (i >= 256 && i < 384 && ovf_next != 0 && i == 300) ? 10'd1000 : 10'($urandom % 600);
      if (i < 256) sent.push_back(s_data);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    if (ovf_next != 0) ovf_next--;
  end

  // ------------------------------------------------------- LBM model
  logic [31:0] mem [int unsigned];
  always @(posedge clk) if (lbm_valid && lbm_ready) mem[lbm_addr] = lbm_wdata;

  // verify each kept event a few clocks after its last header word
  initial forever begin
    logic [31:0] base, w2;
    logic [9:0] f [256];
    @(negedge clk);
    if (!rst_n) continue;
    if (dut.u_evb.ev_dropped) begin repeat (256) void'(sent.pop_front()); n_dropped_lc++; end
    if (dut.u_evb.ev_kept) begin
      // the pointer has already advanced past this event's block
      base = LBM_BASE + ((dut.u_evb.lbm_ptr - 2048) % LSZ);
      if (dut.u_evb.lbm_ptr - 2048 >= LSZ) n_wrap++;
      repeat (5) @(negedge clk);
      `CHECK(sent.size() >= 256, "a kept event has a finished stream")
      for (int i = 0; i < 256; i++) f[i] = (sent.size() != 0) ? sent.pop_front() : 10'd0;
      n_kept++;
      `CHECK(mem[base][31:16] == 16'h0001, "header constant")
      w2 = mem[base + 8];
      if (w2[20:19] != 0) n_ovf++;
      if (w2[25]) n_lc_ev++;
      if (w2[4])  n_cal_ev++;
      `CHECK(mem[base + 12] >= 100, $sformatf("dead time %0d covers the digitizer delay", mem[base + 12]))
      if (w2[17])
        for (int p = 0; p < 128; p++)
          `CHECK(mem[base + 16 + 4*p] == {6'd0, f[2*p+1], 6'd0, f[2*p]}, $sformatf("FADC word %0d of block %h", p, base))
    end
  end

  // --------------------------------------------------------- stimulus
  task automatic spe_hit(input bit with_lc);
    @(negedge clk); disc_spe_in = 1; lc_rx_up_in = with_lc;
    repeat (2) @(negedge clk); disc_spe_in = 0; lc_rx_up_in = 0;
    n_hits++;
  endtask
  task automatic wait_idle();
    repeat (50) @(negedge clk);
    while (q_b.size() != 0 || s_valid || dut.u_evb.busy_a || dut.u_evb.busy_b) @(negedge clk);
    repeat (20) @(negedge clk);
  endtask

  logic [31:0] d;
  int k0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 512; i++) wreg(A_PED_A + 13'(4*i), 0);
    for (int i = 0; i < 512; i++) wreg(A_PED_B + 13'(4*i), 0);
    for (int i = 0; i < 256; i++) wreg(A_R2R_PAT + 13'(4*i), 32'(i + 1));
    wreg(A_INT_EN, 32'h7);
    wreg(A_RATE_CTRL, 32'h0000_0001);                 // SPE meter, 100 ns dead time
    wreg(A_SN_CTRL, 32'h0000_0001);                   // supernova on SPE
    wreg(A_LC_CTRL, 32'h0909_000D);                   // tx up, rx up/down, pre/post 10
    wreg(A_TRIG_SRC, 32'h0000_0011);                  // SPE and LED
    wreg(A_DAQ, 32'h0000_0007);                       // enable, A, B; LC off; wrap

    // ---- LC off: 5 events, the 5th wraps, the 3rd has an overflow
    for (int e = 0; e < 5; e++) begin
      if (e == 2) ovf_next = 1;
      spe_hit(0);
      wait_idle();
    end
    // ---- LC hard: without LC dropped, with LC kept
    wreg(A_DAQ, 32'h0002_0007);
    spe_hit(0); wait_idle();
    spe_hit(1); wait_idle();
    // ---- calibration: CPU forced LED + ATWD R2R, heart beat keeps it
    wreg(A_CAL_CTRL, 32'h0000_3024);
    wreg(A_CAL_LAUNCH, 32'h0000_00A5);
    wait_idle();
    // ---- burst of three hits: the third finds both ATWDs busy
    wreg(A_DAQ, 32'h0000_0007);
    k0 = n_trig_drop;
    repeat (3) begin spe_hit(0); repeat (30) @(negedge clk); end
    wait_idle();
    // ---- stop when full
    wreg(A_DAQ, 32'h0010_0006);                       // data taking off, stop mode
    wreg(A_LBM_CTRL, 1);
    wreg(A_DAQ, 32'h0010_0007);
    for (int e = 0; e < 4; e++) begin spe_hit(0); wait_idle(); end
    rreg(A_LBM_PTR, d);
    `CHECK(d == LSZ, $sformatf("pointer at full: %h", d))
    spe_hit(0);
    repeat (400) @(negedge clk);
    `CHECK(n_stall > 200, "full LBM holds the sample stream")
    wreg(A_DAQ, 32'h0010_0006);
    wreg(A_LBM_CTRL, 1);
    wait_idle();
    rreg(A_LBM_PTR, d);
    `CHECK(d == 2048, $sformatf("pointer after reset and flush: %h", d))
    // ---- communication: three packets in, one read
    repeat (3) begin @(negedge clk) comm_pkt_rcvd = 1; @(negedge clk) comm_pkt_rcvd = 0; end
    rreg(A_COMM_RX_PKTS, d); `CHECK(d == 3, "three packets counted")
    wreg(A_COMM_RX_TAIL, 32'd40);
    rreg(A_COMM_RX_PKTS, d); `CHECK(d == 2, "rx_tail write consumes one packet")
    // ---- let the rate meter close its gates
    repeat (3 * GATE) @(negedge clk);

    $display("kept %0d lc-dropped %0d A %0d B %0d ovf %0d lc %0d cal %0d wrap %0d trigdrop %0d",
             n_kept, n_dropped_lc, n_a, n_b, n_ovf, n_lc_ev, n_cal_ev, n_wrap, n_trig_drop);
    $display("lc-sent %0d flash %0d r2r %0d rate-irq %0d sn-irq %0d stall %0d hits %0d rate-sum %0d",
             n_tx_lc, n_flash, n_r2r, n_rate_irq, n_sn_irq, n_stall, n_hits, rate_sum);
    `CHECK(n_kept == n_launch - n_dropped_lc, "every launch ends kept or dropped")
    `CHECK(n_kept >= 10, "events written")
    `CHECK(n_a > 0 && n_b > 0, "both ATWDs used")
    `CHECK(n_ovf >= 1, "overflow channel selection")
    `CHECK(n_wrap >= 1, "LBM wrap")
    `CHECK(n_lc_ev >= 1, "LC coincident event")
    `CHECK(n_dropped_lc >= 1, "HARD LC drop")
    `CHECK(n_tx_lc >= 1, "LC sent")
    `CHECK(n_cal_ev >= 1, "calibration event")
    `CHECK(n_flash >= 1, "calibration interrupt")
    `CHECK(n_r2r >= 200, "R2R playback")
    `CHECK(n_trig_drop > k0, "trigger dropped with both ATWDs busy")
    `CHECK(n_rate_irq >= 3, "rate meter updates")
    `CHECK(n_sn_irq >= 3, "supernova updates")
    `CHECK(rate_sum == n_hits, $sformatf("rate meter counted %0d of %0d hits", rate_sum, n_hits))
    `FINISH
  end
endmodule
