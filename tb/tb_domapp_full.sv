// Full-size testbench for domapp_top: the top is built with its default
// parameters (1 s rate meter gate, 8 MB look back memory, 2^16-clock
// supernova slots), exactly as it would be loaded into the device.
//
// A CPU model loads non-zero ATWD A and B pedestals, enables the rate meter,
// the supernova meter and their interrupts, selects the SPE discriminator as
// trigger and starts data taking (ATWD & FADC, normal ATWD mode, LC off,
// wrap). Three SPE hits follow. A front-end model answers each ATWD launch
// with a 768-sample stream and an LBM model stores every DMA write. Each
// event is checked word by word: header constant and timestamp, trigger
// word, A/B flag, dead time, all 256 FADC samples and all 128
// pedestal-subtracted ATWD channel 0 samples (clamped at zero). The test
// then waits for the first full one-second rate gate and checks that the
// SPE rate register reads 3 and that supernova interrupts arrived. About
// 41 million clocks are simulated.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_domapp_full;
  import domapp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cpu_wr = 0, cpu_rd = 0, cpu_rvalid;
  logic [12:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [5:0] irq;
  logic disc_spe_in = 0, lc_tx_up, lc_tx_down;
  logic atwd_a_launch, atwd_b_launch, s_valid = 0, s_ready, s_atwd = 0;
  logic [9:0] s_data = 0;
  logic lbm_valid;
  logic [31:0] lbm_addr, lbm_wdata;
  logic fe_pulser, led_flash, flasher_trig, fb_aux_reset, comm_reboot_req, comm_tx_msg_ready;
  logic [7:0] atwd_r2r;
  logic [3:0] fe_pulser_n, fe_pulser_p;
  logic [12:0] comm_tx_head, comm_rx_tail;
  logic [31:0] comm_levels, comm_thrdly, compr_ctrl, icetop_ctrl;
  logic [47:0] dom_id;
  logic [2:0] compr_mode;

  always #12.5 clk = ~clk;

  domapp_top dut (
    .clk, .rst_n, .cpu_wr, .cpu_rd, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rvalid, .irq,
    .disc_spe_in, .disc_mpe_in(1'b0), .lc_rx_up_in(1'b0), .lc_rx_down_in(1'b0),
    .lc_tx_up, .lc_tx_down,
    .atwd_a_launch, .atwd_b_launch, .s_valid, .s_ready, .s_atwd, .s_data,
    .lbm_valid, .lbm_ready(1'b1), .lbm_addr, .lbm_wdata,
    .ahb_bus_error(1'b0), .ahb_slave_err(1'b0),
    .fe_pulser, .led_flash, .flasher_trig, .atwd_r2r, .fe_pulser_n, .fe_pulser_p,
    .fb_aux_reset, .fb_attn(1'b0), .comm_reboot_req, .comm_tx_msg_ready,
    .comm_tx_head, .comm_rx_tail, .comm_tx_tail(13'd0), .comm_pkt_sent(1'b0),
    .comm_rx_head(13'd0), .comm_pkt_rcvd(1'b0), .comm_reboot_granted(1'b0),
    .comm_reset_rcvd(1'b0), .comm_avail(1'b1), .comm_errors(32'd0), .comm_levels,
    .comm_thrdly, .dom_id, .compr_ctrl, .icetop_ctrl, .compr_mode);

  // 1.1 s of simulated time
  initial begin #1_100_000_000; failures++; $display("watchdog"); `FINISH end

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

  int n_rate_irq = 0, n_sn_irq = 0, rate_last = -1;
  logic [31:0] pend, v;
  initial forever begin
    @(posedge clk);
    if (irq != 0 && rst_n) begin
      rreg(A_INT_ACK, pend);
      if (pend[IRQ_RATE]) begin rreg(A_RATE_SPE, v); rate_last = int'(v); n_rate_irq++; end
      if (pend[IRQ_SN]) begin rreg(A_SN_DATA, v); n_sn_irq++; end
      wreg(A_INT_ACK, pend);
    end
  end

  // --------------------------------------------------- front-end model
  bit        q_b [$];
  logic [9:0] smp [3][768];        // the samples sent for each event
  logic [47:0] t_launch [3];
  int n_launch = 0, n_sent = 0;
  always @(posedge clk) if (rst_n && (atwd_a_launch || atwd_b_launch)) begin
    q_b.push_back(atwd_b_launch);
    n_launch++;
  end
  // the builder samples the timestamp at the clock edge that ends the launch
  // pulse, i.e. the value visible in the middle of the pulse
  int n_ts = 0;
  always @(negedge clk) if (rst_n && (atwd_a_launch || atwd_b_launch)) begin
    if (n_ts < 3) t_launch[n_ts] = dut.systime;
    n_ts++;
  end
  initial forever begin
    bit b;
    wait (q_b.size() != 0);
    b = q_b.pop_front();
    repeat (100) @(negedge clk);
    for (int i = 0; i < 768; i++) begin
      s_valid = 1; s_atwd = b;
      s_data = 10'($urandom % 1024);
      if (s_data >= 10'd768) s_data = 10'd700;      // no overflow: channel 0 only
      if (n_sent < 3) smp[n_sent][i] = s_data;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    n_sent++;
  end

  // ------------------------------------------------------- LBM model
  logic [31:0] mem [int unsigned];
  always @(posedge clk) if (lbm_valid) mem[lbm_addr] = lbm_wdata;

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 32'hDEAD_BEEF;
  endfunction
  function automatic logic [9:0] ped(input bit b, input int idx);
    return 10'((b ? 7 : 3) * (idx % 16));
  endfunction
  function automatic logic [9:0] clamp_sub(input logic [9:0] raw, input logic [9:0] p);
    return (raw >= p) ? raw - p : 10'd0;
  endfunction

  logic [31:0] d, base, w;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 512; i++) wreg(A_PED_A + 13'(4*i), 32'(ped(0, i)));
    for (int i = 0; i < 512; i++) wreg(A_PED_B + 13'(4*i), 32'(ped(1, i)));
    wreg(A_INT_EN, 32'h6);                            // rate and supernova
    wreg(A_RATE_CTRL, 32'h0000_0001);                 // SPE meter, 100 ns dead time
    wreg(A_SN_CTRL, 32'h0000_0001);
    wreg(A_TRIG_SRC, 32'h0000_0001);                  // SPE
    wreg(A_DAQ, 32'h0000_0007);                       // enable, A and B

    for (int e = 0; e < 3; e++) begin
      @(negedge clk) disc_spe_in = 1;
      repeat (2) @(negedge clk) disc_spe_in = 0;
      wait (n_sent == e + 1);
      repeat (50) @(negedge clk);
    end
    rreg(A_LBM_PTR, d);
    `CHECK(d == 3 * 2048, $sformatf("LBM pointer after three events: %h", d))

    for (int e = 0; e < 3; e++) begin
      base = LBM_BASE + 32'(e * 2048);
      `CHECK(rd(base) == {HDR_CONST, t_launch[e][15:0]}, $sformatf("event %0d header word 0", e))
      `CHECK(rd(base + 4) == t_launch[e][47:16], $sformatf("event %0d timestamp high", e))
      w = rd(base + 8);
      `CHECK(w[15:0] == 16'h0001, $sformatf("event %0d trigger source SPE", e))
      `CHECK(w[16] == 1'(e % 2), $sformatf("event %0d ATWD A/B alternates", e))
      `CHECK(w[18:17] == 2'b11 && w[20:19] == 2'd0 && w[25:24] == 2'b00,
             $sformatf("event %0d data flags %h", e, w))
      w = rd(base + 12);
      `CHECK(w >= 100 && w < 120, $sformatf("event %0d dead time %0d", e, w))
      for (int i = 0; i < 128; i++) begin
        w = rd(base + 32'(OFS_FADC) + 32'(4 * i));
        `CHECK(w == {6'd0, smp[e][2*i+1], 6'd0, smp[e][2*i]}, $sformatf("event %0d FADC word %0d", e, i))
      end
      for (int i = 0; i < 64; i++) begin
        w = rd(base + 32'(OFS_ATWD) + 32'(4 * i));
        `CHECK(w == {6'd0, clamp_sub(smp[e][256 + 2*i + 1], ped(e % 2 == 1, 2*i + 1)),
                     6'd0, clamp_sub(smp[e][256 + 2*i], ped(e % 2 == 1, 2*i))},
               $sformatf("event %0d ATWD ch0 word %0d", e, i))
      end
      `CHECK(!mem.exists(base + 32'(OFS_ATWD) + 32'h100), $sformatf("event %0d: channel 1 not stored", e))
    end

    // the first one-second gate closes 40,000,000 clocks after reset
    wait (n_rate_irq >= 1);
    repeat (20) @(negedge clk);
    `CHECK(rate_last == 3, $sformatf("rate meter counted %0d of 3 hits", rate_last))
    `CHECK(n_sn_irq >= 100, $sformatf("supernova updates %0d", n_sn_irq))
    `FINISH
  end
endmodule
