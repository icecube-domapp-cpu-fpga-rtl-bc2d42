// Testbench for rate_monitor: random discriminator hits are counted by a
// reference model with the same gate and dead-time rules; the result register
// and the update pulse (once per gate) are compared at every gate end.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_rate_monitor;
  localparam int GATE = 1000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enable = 0, hit = 0, update;
  logic [9:0] deadtime = 0;
  logic [15:0] rate;
  always #12.5 clk = ~clk;
  rate_monitor #(.GATE_CYCLES(GATE), .DT_UNIT(4)) dut (.clk, .rst_n, .enable, .deadtime, .hit, .rate, .update);
  initial begin #5_000_000; failures++; `FINISH end

  int cyc, mcnt, mdt, expect_rate, gates, last_upd;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; cyc = 0; mcnt = 0; mdt = 0; gates = 0; last_upd = -1;
    enable = 1; deadtime = 2;           // 300 ns = 12 clocks
    repeat (6 * GATE) begin
      hit = ($urandom % 5) == 0;
      if (cyc == 3 * GATE) begin enable = 0; end
      if (cyc == 4 * GATE) begin enable = 1; deadtime = 0; end
      @(posedge clk);
      // model: this edge samples hit/enable/deadtime
      if (enable && hit && mdt == 0) begin mcnt++; mdt = (deadtime + 1) * 4 - 1; end
      else if (mdt != 0) mdt--;
      cyc++;
      if (cyc % GATE == 0) begin expect_rate = mcnt; mcnt = 0; end
      #1;
      if (update) begin
        gates++;
        `CHECK(rate == 16'(expect_rate), $sformatf("rate %0d expected %0d", rate, expect_rate))
        if (last_upd >= 0) `CHECK(cyc - last_upd == GATE, "gate length")
        last_upd = cyc;
      end
    end
    `CHECK(gates == 6, $sformatf("%0d updates in 6 gates", gates))
    `FINISH
  end
endmodule
