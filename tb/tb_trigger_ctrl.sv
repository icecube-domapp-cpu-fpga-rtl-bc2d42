// Testbench for trigger_ctrl: source enables, SPE priority over MPE,
// calibration and LC trigger bits, the DAQ enables, A/B alternation, busy
// handling and dropped triggers. Each case drives one clock of inputs and
// compares the registered launch outputs with the expected ones.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_trigger_ctrl;
  import domapp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] trig_src = 0;
  daq_reg_t daq;
  logic disc_spe = 0, disc_mpe = 0, cal_launch = 0, lc_rx_up = 0, lc_rx_down = 0;
  logic busy_a = 0, busy_b = 0;
  logic [5:0] cal_src = 0;
  logic launch_a, launch_b, ev_is_cal, dropped;
  logic [15:0] ev_trig;
  always #12.5 clk = ~clk;
  trigger_ctrl dut (.clk, .rst_n, .trig_src, .daq, .disc_spe, .disc_mpe, .cal_launch, .cal_src,
                    .lc_rx_up, .lc_rx_down, .busy_a, .busy_b, .launch_a, .launch_b,
                    .ev_trig, .ev_is_cal, .dropped);
  initial begin #1_000_000; failures++; `FINISH end

  // present inputs for one clock; check the outputs one clock later
  task automatic pulse(input logic spe, input logic mpe, input logic cal, input logic [5:0] cs,
                       input logic lu, input logic ld,
                       input logic ea, input logic eb, input logic [15:0] et, input logic ec,
                       input string what);
    @(negedge clk);
    disc_spe = spe; disc_mpe = mpe; cal_launch = cal; cal_src = cs; lc_rx_up = lu; lc_rx_down = ld;
    @(negedge clk);
    disc_spe = 0; disc_mpe = 0; cal_launch = 0; lc_rx_up = 0; lc_rx_down = 0;
    `CHECK(launch_a == ea && launch_b == eb, $sformatf("%s: launch a=%0b b=%0b", what, launch_a, launch_b))
    if (ea || eb) `CHECK(ev_trig == et && ev_is_cal == ec, $sformatf("%s: trig %h cal %0b", what, ev_trig, ev_is_cal))
  endtask

  initial begin
    daq = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    trig_src = 10'h3FF;
    pulse(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, "data taking off");
    daq.enable = 1; daq.atwd_a_en = 1; daq.atwd_b_en = 1;
    pulse(1, 0, 0, 0, 0, 0, 1, 0, 16'h001, 0, "SPE launches A first");
    pulse(1, 0, 0, 0, 0, 0, 0, 1, 16'h001, 0, "next goes to B");
    pulse(0, 1, 0, 0, 0, 0, 0, 0, 0, 0, "MPE blocked while SPE enabled");
    pulse(1, 1, 0, 0, 0, 0, 1, 0, 16'h001, 0, "SPE and MPE: only SPE bit");
    trig_src = 10'h3FE;
    pulse(0, 1, 0, 0, 0, 0, 0, 1, 16'h002, 0, "MPE alone when SPE disabled");
    pulse(0, 0, 1, 6'b000100, 0, 0, 1, 0, 16'h010, 1, "LED calibration launch -> bit 4");
    pulse(0, 0, 1, 6'b000001, 0, 0, 0, 1, 16'h004, 1, "dark launch -> bit 2");
    pulse(0, 0, 0, 0, 1, 0, 1, 0, 16'h100, 0, "LC up trigger");
    pulse(0, 0, 0, 0, 0, 1, 0, 1, 16'h200, 0, "LC down trigger");
    trig_src = 10'h0FE;
    pulse(0, 0, 0, 0, 1, 1, 0, 0, 0, 0, "LC triggers disabled");
    trig_src = 10'h3FF;
    busy_a = 1;
    pulse(1, 0, 0, 0, 0, 0, 0, 1, 16'h001, 0, "A busy -> B");
    pulse(1, 0, 0, 0, 0, 0, 0, 1, 16'h001, 0, "A still busy -> B again");
    busy_b = 1;
    pulse(1, 0, 0, 0, 0, 0, 0, 0, 0, 0, "both busy: dropped");
    `CHECK(dropped, "drop reported")
    busy_a = 0; busy_b = 0; daq.atwd_b_en = 0;
    pulse(1, 0, 0, 0, 0, 0, 1, 0, 16'h001, 0, "only A enabled");
    pulse(1, 0, 0, 0, 0, 0, 1, 0, 16'h001, 0, "only A enabled again");
    `FINISH
  end
endmodule
