// Testbench for calib_ctrl. Checks, against times worked out from the
// register settings:
//  * repeating mode: flashes every 2^(26-PulserRate) clocks, at the recorded
//    time T with T mod period = period/2, outputs in the cycle systime = T+2,
//    Last Calibration Flash Time = T, interrupt with the flash;
//  * ATWD launch at T + 2 + offset for offsets -8, 0 and +7;
//  * time match: one flash at Calibration Time (+2), only after arming;
//  * CPU forced: 0xA5 flashes, other values do not;
//  * R2R playback of all 256 pattern entries, one per clock, on both ladders.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_calib_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [47:0] systime;
  logic [31:0] ctrl = 0, cal_time = 0;
  logic cpu_launch_wr = 0, pat_we = 0;
  logic [7:0] cpu_launch_data = 0, pat_addr = 0, pat_wdata = 0;
  logic fe_pulser, led, flasher, r2r_active, atwd_launch, irq;
  logic [7:0] atwd_r2r;
  logic [3:0] fe_n, fe_p;
  logic [5:0] launch_src;
  logic [47:0] last_flash;
  always #12.5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) systime <= 48'd100; else systime <= systime + 1'b1;

  calib_ctrl dut (.clk, .rst_n, .systime, .ctrl, .cal_time, .cpu_launch_wr, .cpu_launch_data,
                  .pat_we, .pat_addr, .pat_wdata, .fe_pulser, .led, .flasher,
                  .atwd_r2r, .fe_pulser_n(fe_n), .fe_pulser_p(fe_p), .r2r_active,
                  .atwd_launch, .launch_src, .last_flash, .irq);
  initial begin #20_000_000; failures++; `FINISH end

  function automatic logic [7:0] pat(input int i); return 8'((i * 37 + 11) ^ (i >> 3)); endfunction

  // event logs (systime of each output pulse)
  longint led_t[$], launch_t[$], irq_t[$], fl_t[$];
  always @(posedge clk) begin
    #1;
    if (led) led_t.push_back(longint'(systime));
    if (flasher) fl_t.push_back(longint'(systime));
    if (atwd_launch) launch_t.push_back(longint'(systime));
    if (irq) irq_t.push_back(longint'(systime));
  end

  function automatic logic [31:0] mk(input int src, input int mode, input int off, input int rate);
    return 32'(src) | (32'(mode) << 12) | ((32'(off) & 32'hF) << 16) | (32'(rate) << 24);
  endfunction

  task automatic clear_logs(); led_t = {}; launch_t = {}; irq_t = {}; fl_t = {}; endtask

  int off_list[3] = '{-8, 0, 7};
  longint t0, per, expt;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); pat_we = 1; pat_addr = 8'(i); pat_wdata = pat(i);
    end
    @(negedge clk) pat_we = 0;

    // ---- repeating mode, rate 17 -> period 512 clocks, LED + dark
    foreach (off_list[k]) begin
      ctrl = mk(6'b000101, 1, off_list[k], 17);
      clear_logs();
      repeat (2000) @(posedge clk);
      ctrl = 0;
      repeat (40) @(posedge clk);
      per = 512;
      `CHECK(led_t.size() >= 3, $sformatf("repeat: %0d flashes", led_t.size()))
      foreach (led_t[i]) begin
        `CHECK((led_t[i] - 2) % per == per / 2,
               $sformatf("flash at %0d not on the bit edge + 2", led_t[i]))
        if (i > 0) `CHECK(led_t[i] - led_t[i-1] == per, "flash period")
      end
      `CHECK(launch_t.size() == led_t.size(), "one launch per flash")
      foreach (launch_t[i])
        `CHECK(launch_t[i] == led_t[i] + off_list[k],
               $sformatf("offset %0d: launch %0d flash %0d", off_list[k], launch_t[i], led_t[i]))
      `CHECK(irq_t.size() == led_t.size() && irq_t[0] == led_t[0], "irq with flash")
      `CHECK(last_flash == 48'(led_t[led_t.size()-1] - 2), "last flash time = flash - 2")
    end

    // ---- rate 10 -> period 65536 clocks: one flash, check the phase only
    ctrl = mk(6'b001000, 1, 0, 10);
    clear_logs();
    repeat (70000) @(posedge clk);
    ctrl = 0;
    repeat (40) @(posedge clk);
    `CHECK(fl_t.size() == 1, $sformatf("rate 10: %0d flashes", fl_t.size()))
    if (fl_t.size() > 0) `CHECK((fl_t[0] - 2) % 65536 == 32768, "rate 10 phase")

    // ---- time match: not armed when the time is set while already in mode 2
    cal_time = 32'(systime) + 32'd300;
    ctrl = mk(6'b000100, 2, 3, 0);       // OFF -> time match: armed
    clear_logs();
    repeat (1000) @(posedge clk);
    `CHECK(led_t.size() == 1, $sformatf("time match: %0d flashes", led_t.size()))
    if (led_t.size() == 1) begin
      `CHECK(led_t[0] == longint'(cal_time) + 2, "time match flash time")
      `CHECK(last_flash[31:0] == cal_time, "time match last flash")
      `CHECK(launch_t[0] == led_t[0] + 3, "time match launch offset +3")
    end
    cal_time = 32'(systime) + 32'd300;  // new time without re-arming
    clear_logs();
    repeat (1000) @(posedge clk);
    `CHECK(led_t.size() == 0, "time match needs re-arming")

    // ---- CPU forced
    ctrl = mk(6'b000100, 3, 0, 0);
    clear_logs();
    @(negedge clk); cpu_launch_wr = 1; cpu_launch_data = 8'h5A;
    @(negedge clk); cpu_launch_wr = 0;
    repeat (50) @(posedge clk);
    `CHECK(led_t.size() == 0, "wrong key does not flash")
    @(negedge clk); cpu_launch_wr = 1; cpu_launch_data = 8'hA5; t0 = longint'(systime);
    @(negedge clk); cpu_launch_wr = 0;
    repeat (50) @(posedge clk);
    `CHECK(led_t.size() == 1, "A5 flashes once")
    if (led_t.size() == 1) `CHECK(led_t[0] == t0 + 10, $sformatf("CPU flash at %0d, write at %0d", led_t[0], t0))
    `CHECK(last_flash == 48'(t0 + 8), "CPU flash recorded time")

    // ---- R2R playback on both ladders
    ctrl = mk(6'b110000, 3, 0, 0);
    @(negedge clk); cpu_launch_wr = 1; cpu_launch_data = 8'hA5; t0 = longint'(systime);
    @(negedge clk); cpu_launch_wr = 0;
    wait (r2r_active);
    #1 expt = longint'(systime);
    `CHECK(expt == t0 + 10, "R2R starts with the flash")
    for (int i = 0; i < 256; i++) begin
      `CHECK(atwd_r2r == pat(i) && fe_n == pat(i)[3:0] && fe_p == pat(i)[7:4],
             $sformatf("R2R sample %0d: %h expected %h", i, atwd_r2r, pat(i)))
      @(posedge clk); #1;
    end
    `CHECK(!r2r_active && atwd_r2r == 0, "R2R stops after 256 samples")
    `FINISH
  end
endmodule
