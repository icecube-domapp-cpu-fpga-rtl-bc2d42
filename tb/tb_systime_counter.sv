// Testbench for systime_counter: after reset the system time must equal the
// number of clock edges seen, and bit 2 must toggle as a 5 MHz square wave.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_systime_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [47:0] systime;
  logic tgl;
  always #12.5 clk = ~clk;
  systime_counter dut (.clk, .rst_n, .systime, .tgl_5mhz(tgl));

  initial begin #1_000_000; failures++; `FINISH end

  longint n;
  int toggles;
  logic tgl_q;
  initial begin
    repeat (3) @(posedge clk);
    #1 `CHECK(systime == 0, "systime held at 0 in reset")
    rst_n = 1;
    n = 0; toggles = 0; tgl_q = tgl;
    repeat (1000) begin
      @(posedge clk); n++;
      #1 `CHECK(systime == 48'(n), $sformatf("systime %0d expected %0d", systime, n))
      if (tgl != tgl_q) toggles++;
      tgl_q = tgl;
    end
    `CHECK(toggles == 250, $sformatf("5 MHz toggle count %0d", toggles))
    `FINISH
  end
endmodule
