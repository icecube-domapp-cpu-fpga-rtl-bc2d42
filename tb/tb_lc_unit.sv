// Testbench for lc_unit. Directed cases with hand-computed windows:
// LC before the launch inside/outside the pre window, after the launch
// inside/outside the post window plus cable delay, "require both", self LC,
// disabled receivers, and LC sending on the selected discriminator. Also
// checks that the decision arrives when the longest window closes.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_lc_unit;
  import domapp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  lc_reg_t cfg;
  logic [31:0] cable_up, cable_dn;
  logic disc_spe = 0, disc_mpe = 0, launch = 0, rx_up = 0, rx_down = 0;
  logic tx_up, tx_down, done, got_up, got_down, self_hit, lc_ok;
  always #12.5 clk = ~clk;
  lc_unit dut (.clk, .rst_n, .cfg, .cable_up, .cable_dn, .disc_spe, .disc_mpe, .launch,
               .rx_up, .rx_down, .tx_up, .tx_down, .done, .got_up, .got_down, .self_hit, .lc_ok);
  initial begin #5_000_000; failures++; `FINISH end

  // one trial: an up pulse at t_up and a down pulse at t_dn (relative to the
  // launch clock, negative = before; 999 = none), a self discriminator pulse
  // at t_self; returns the clocks from launch to done
  int dcyc;
  task automatic trial(input int t_up, input int t_dn, input int t_self);
    int t;
    dcyc = -1;
    for (t = -80; t < 300; t++) begin
      @(negedge clk);
      rx_up    = (t == t_up);
      rx_down  = (t == t_dn);
      launch   = (t == 0);
      disc_mpe = (t == t_self);
      @(posedge clk); #1;
      if (done && dcyc < 0) dcyc = t;
    end
    @(negedge clk); rx_up = 0; rx_down = 0; launch = 0; disc_mpe = 0;
  endtask

  initial begin
    cfg = '0;
    cfg.rx_up = 1; cfg.rx_down = 1; cfg.tx_up = 1; cfg.tx_down = 0;
    cfg.pre_win = 6'd9;            // 10 clocks: t = -9..0
    cfg.post_win = 6'd19;          // 20 clocks + cable
    cfg.span = 2'd1;               // neighbour distance 1
    cable_up = 32'h00_00_05_63;    // distance 1 = 5
    cable_dn = 32'h00_00_0C_63;    // distance 1 = 12
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    trial(-9, 999, 999);
    `CHECK(got_up && !got_down && lc_ok, "up at the pre-window edge counts")
    `CHECK(dcyc == 20 + 12, $sformatf("decision after longest window: %0d", dcyc))
    trial(-10, 999, 999);
    `CHECK(!got_up && !lc_ok, "up just before the pre window is ignored")
    trial(999, 32, 999);
    `CHECK(got_down && lc_ok, "down at post + cable edge counts")
    trial(999, 33, 999);
    `CHECK(!got_down && !lc_ok, "down after post + cable is ignored")
    trial(25, 999, 999);
    `CHECK(got_up, "up at post + cable (25) counts")
    trial(26, 999, 999);
    `CHECK(!got_up, "up at 26 is outside")
    cfg.need_both = 1;
    trial(3, 999, 999);
    `CHECK(got_up && !lc_ok, "need both: one side is not enough")
    trial(3, -2, 999);
    `CHECK(lc_ok, "need both: both sides")
    cfg.need_both = 0;
    cfg.rx_up = 0;
    trial(3, 999, 999);
    `CHECK(!got_up && !lc_ok, "receiver up disabled")
    cfg.rx_up = 1;
    cfg.self_mode = 2'd2; cfg.self_win = 6'd40;
    trial(999, 999, 40);
    `CHECK(self_hit && lc_ok && !got_up, "self LC inside its window")
    `CHECK(dcyc == 40, $sformatf("self window is the longest: %0d", dcyc))
    trial(999, 999, 41);
    `CHECK(!self_hit && !lc_ok, "self LC outside its window")

    // sending: SPE selected, up only
    cfg.disc_mpe = 0;
    @(negedge clk) disc_spe = 1;
    @(negedge clk) disc_spe = 0;
    `CHECK(tx_up && !tx_down, "LC sent up on SPE")
    @(negedge clk);
    `CHECK(!tx_up, "LC pulse is one clock")
    cfg.disc_mpe = 1; cfg.tx_down = 1;
    @(negedge clk) disc_spe = 1;
    @(negedge clk) disc_spe = 0;
    `CHECK(!tx_up && !tx_down, "SPE ignored when MPE is the LC source")
    @(negedge clk) disc_mpe = 1;
    @(negedge clk) disc_mpe = 0;
    `CHECK(tx_up && tx_down, "LC sent both ways on MPE")
    `FINISH
  end
endmodule
