// Testbench for event_builder (LBM shortened to 4 blocks of 2 kB).
//
// A digitizer model streams 256 FADC and 4 x 128 ATWD samples per event
// with random gaps; an LBM model accepts writes with random back-pressure
// and records them. For every event the testbench computes the expected
// 2 kB block from the samples, the pedestals and the register settings
// (DAQ mode, ATWD mode with overflow-driven channel selection, LC mode and
// heart-beat rule) and compares the set of written words exactly: header
// fields, dead time (clocks from launch to first sample), timestamp, the
// LBM pointer, pointer wrap, stop-when-full and the pointer reset.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_event_builder;
  import domapp_pkg::*;
  localparam int unsigned LSZ = 8192;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [47:0] systime;
  daq_reg_t daq;
  logic lbm_rst = 0, launch_a = 0, launch_b = 0, ev_is_cal = 0;
  logic [15:0] ev_trig = 0;
  logic lc_done = 0, lc_up = 0, lc_down = 0, lc_ok = 0;
  logic ped_we_a = 0, ped_we_b = 0;
  logic [8:0] ped_waddr = 0;
  logic [9:0] ped_wdata = 0;
  logic s_valid = 0, s_ready, s_atwd = 0;
  logic [9:0] s_data = 0;
  logic m_valid, m_ready;
  logic [31:0] m_addr, m_wdata, lbm_ptr;
  logic busy_a, busy_b, xfer, ev_kept, ev_dropped;

  always #12.5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) systime <= 48'h0000_ABCD_0000; else systime <= systime + 1'b1;

  event_builder #(.LBM_SIZE(LSZ)) dut (.*);
  initial begin #50_000_000; failures++; `FINISH end

  // ------------------------------------------------------ LBM model
  logic [31:0] mem [int unsigned];
  always_ff @(posedge clk) begin
    if (m_valid && m_ready) mem[m_addr] = m_wdata;
  end
  always @(negedge clk) m_ready = ($urandom % 10) < 7;

  // ------------------------------------------------ dead-time capture
  longint cyc = 0, l_cyc, a_cyc;
  logic first_seen;
  always @(posedge clk) begin
    cyc++;
    if (launch_a || launch_b) begin l_cyc = cyc; first_seen = 0; end
    if (s_valid && s_ready && !first_seen) begin a_cyc = cyc; first_seen = 1; end
  end

  logic signed [9:0] ped [2][512];
  logic [9:0] smp [768];
  longint ts_launch;
  int unsigned ptr_model = 0;
  int kept = 0, dropped_n = 0;

  // expected block for the current event; returns expected words in exp
  logic [31:0] exp_w [int unsigned];
  function automatic logic [9:0] psub(input logic [9:0] r, input logic signed [9:0] p);
    int t = int'(r) - int'(p);
    return (t <= 0) ? 10'd0 : (t >= 1023) ? 10'd1023 : 10'(t);
  endfunction

  task automatic run_event(input bit b, input logic [3:0] ovf_ch, input bit is_cal,
                           input int lc_when, input bit lcok, input bit lup, input bit ldn,
                           input string what);
    bit want_f, want_a, all_ch, need, drop, hdr_only;
    bit on [4];
    int size, dm, am, lm;
    int unsigned base;
    // samples
    for (int i = 0; i < 768; i++) smp[i] = 10'($urandom % 700);
    for (int c = 0; c < 4; c++) if (ovf_ch[c]) smp[256 + c*128 + 77] = 10'd900;
    // launch
    @(negedge clk);
    ev_trig = 16'h0010 | 16'(b); ev_is_cal = is_cal;
    if (b) launch_b = 1; else launch_a = 1;
    ts_launch = longint'(systime);
    @(negedge clk); launch_a = 0; launch_b = 0;
    `CHECK((b ? busy_b : busy_a), {what, ": busy after launch"})
    // LC before the samples
    if (lc_when == 0) begin
      repeat (3) @(negedge clk);
      lc_done = 1; lc_ok = lcok; lc_up = lup; lc_down = ldn;
      @(negedge clk) lc_done = 0;
    end
    repeat (5 + $urandom % 20) @(negedge clk);
    mem.delete();
    // stream
    for (int i = 0; i < 768; i++) begin
      while (($urandom % 4) == 0) @(negedge clk);
      s_valid = 1; s_atwd = b; s_data = smp[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk) s_valid = 0;
    end
    if (lc_when == 1) begin
      repeat (30) @(negedge clk);
      lc_done = 1; lc_ok = lcok; lc_up = lup; lc_down = ldn;
      @(negedge clk) lc_done = 0;
    end
    while (b ? busy_b : busy_a) @(negedge clk);
    repeat (2) @(negedge clk);

    // ---- expected block
    dm = int'(daq.daq_mode); am = int'(daq.atwd_mode); lm = int'(daq.lc_mode);
    want_f = (dm == 0 || dm == 1);
    want_a = (dm == 0);
    all_ch = (am == 1 || am == 2);
    need   = (lm != 0) && (dm != 2) && !(is_cal && !daq.lc_hb_dis);
    drop     = need && !lcok && (lm == 2);
    hdr_only = need && !lcok && !drop;
    on[0] = want_a;
    for (int c = 1; c < 4; c++) on[c] = all_ch ? want_a : (c < 3 && on[c-1] && ovf_ch[c-1]);
    size = on[3] ? 3 : on[2] ? 2 : on[1] ? 1 : 0;
    base = LBM_BASE + (ptr_model % LSZ);
    exp_w.delete();
    if (want_f)
      for (int p = 0; p < 128; p++)
        exp_w[base + 32'h10 + p*4] = {6'd0, smp[2*p+1], 6'd0, smp[2*p]};
    for (int c = 0; c < 4; c++) if (on[c])
      for (int p = 0; p < 64; p++)
        exp_w[base + 32'h210 + c*256 + p*4] =
          {6'd0, psub(smp[256 + c*128 + 2*p+1], ped[b][c*128 + 2*p+1]),
           6'd0, psub(smp[256 + c*128 + 2*p], ped[b][c*128 + 2*p])};
    if (!drop) begin
      exp_w[base + 0] = {16'h0001, ts_launch[15:0]};
      exp_w[base + 4] = ts_launch[47:16];
      exp_w[base + 8] = {6'd0, lup && need, ldn && need, 3'd0, (want_a && !hdr_only) ? 2'(size) : 2'd0,
                         want_a && !hdr_only, want_f && !hdr_only, b, 16'h0010 | 16'(b)};
      exp_w[base + 12] = 32'(a_cyc - l_cyc);
      ptr_model += 2048;
      kept++;
    end else dropped_n++;
    // ---- compare
    `CHECK(mem.size() == exp_w.size(), $sformatf("%s: %0d words written, %0d expected", what, mem.size(), exp_w.size()))
    foreach (exp_w[a])
      `CHECK(mem.exists(a) && mem[a] == exp_w[a],
             $sformatf("%s: addr %h got %h expected %h", what, a, mem.exists(a) ? mem[a] : 32'hx, exp_w[a]))
    `CHECK(lbm_ptr == ptr_model, $sformatf("%s: pointer %h expected %h", what, lbm_ptr, ptr_model))
  endtask

  initial begin
    daq = '0;
    for (int i = 0; i < 512; i++) begin
      ped[0][i] = 10'($signed(int'($urandom % 41) - 20));
      ped[1][i] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); ped_we_a = 1; ped_waddr = 9'(i); ped_wdata = ped[0][i];
    end
    @(negedge clk); ped_we_a = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); ped_we_b = 1; ped_waddr = 9'(i); ped_wdata = 0;
    end
    @(negedge clk); ped_we_b = 0;

    daq.enable = 1; daq.atwd_a_en = 1; daq.atwd_b_en = 1;
    run_event(0, 4'b0000, 0, 2, 0, 0, 0, "normal, no overflow");
    run_event(1, 4'b0001, 0, 2, 0, 0, 0, "overflow ch0 -> ch1");
    run_event(0, 4'b0011, 0, 2, 0, 0, 0, "overflow ch0,ch1 -> ch2");
    run_event(1, 4'b0111, 0, 2, 0, 0, 0, "wrap: block 4, ch3 never in normal mode");
    run_event(0, 4'b0010, 0, 2, 0, 0, 0, "wrapped to block 0; ch1 overflow alone adds nothing");
    daq.atwd_mode = 3'd1;
    run_event(1, 4'b0000, 0, 2, 0, 0, 0, "testing mode: all channels");
    daq.atwd_mode = 3'd0; daq.daq_mode = 3'd1;
    run_event(0, 4'b0001, 0, 2, 0, 0, 0, "FADC only");
    daq.daq_mode = 3'd2;
    run_event(1, 4'b0001, 0, 2, 0, 0, 0, "timestamp only");
    daq.daq_mode = 3'd0; daq.lc_mode = 3'd2;
    run_event(0, 4'b0000, 0, 0, 1, 1, 0, "HARD with LC from up");
    run_event(1, 4'b0000, 0, 1, 1, 0, 1, "HARD, LC decided after the samples");
    run_event(0, 4'b0000, 0, 0, 0, 0, 0, "HARD without LC: dropped");
    run_event(0, 4'b0000, 1, 2, 0, 0, 0, "HARD, calibration event, heart beat");
    daq.lc_hb_dis = 1;
    run_event(1, 4'b0000, 1, 0, 0, 0, 0, "HARD, calibration, heart beat off: dropped");
    daq.lc_hb_dis = 0; daq.lc_mode = 3'd1;
    run_event(0, 4'b0001, 0, 0, 0, 0, 0, "SOFT without LC: header only");
    `CHECK(dropped_n == 2, "two events dropped")

    // ---- stop when full
    daq.lc_mode = 3'd0; daq.lbm_mode = 3'd1;
    @(negedge clk); lbm_rst = 1;
    @(negedge clk); lbm_rst = 0;
    ptr_model = 0;
    for (int e = 0; e < 4; e++) run_event(e[0], 4'b0000, 0, 2, 0, 0, 0, "stop mode fill");
    `CHECK(lbm_ptr == LSZ, "buffer full")
    fork
      begin
        @(negedge clk); ev_trig = 16'h0011; launch_b = 1;
        @(negedge clk); launch_b = 0;
        s_valid = 1; s_atwd = 1; s_data = 10'd5;
        repeat (300) begin
          @(posedge clk); #1;
          `CHECK(!s_ready, "full: samples back up")
        end
        @(negedge clk) s_valid = 0;
      end
    join
    `CHECK(lbm_ptr == LSZ, "full: pointer holds")
    @(negedge clk); lbm_rst = 1;
    @(negedge clk); lbm_rst = 0;
    `CHECK(lbm_ptr == LSZ, "reset waits for the next block")
    ptr_model = 0;
    // the waiting event of ATWD B now drains into block 0
    for (int i = 0; i < 768; i++) begin
      s_valid = 1; s_atwd = 1; s_data = 10'd5;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk) s_valid = 0;
    end
    while (busy_b) @(negedge clk);
    `CHECK(lbm_ptr == 2048, $sformatf("after reset the flushed event lands in block 0 (%h)", lbm_ptr))
    `FINISH
  end
endmodule
