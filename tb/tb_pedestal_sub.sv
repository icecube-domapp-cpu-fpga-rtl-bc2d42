// Testbench for pedestal_sub: random signed pedestals are written, then every
// index is read with raw values chosen to hit both clamps and the pass-through
// range; results are compared with raw - pedestal clamped to 0..1023.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_pedestal_sub;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we = 0;
  logic [8:0] waddr = 0, idx = 0;
  logic [9:0] wdata = 0, raw = 0, sub;
  logic signed [9:0] ped [512];
  always #12.5 clk = ~clk;
  pedestal_sub dut (.clk, .we, .waddr, .wdata, .idx, .raw, .sub);
  initial begin #10_000_000; failures++; `FINISH end

  function automatic logic [9:0] expect_sub(input logic [9:0] r, input logic signed [9:0] p);
    int t = int'(r) - int'(p);
    if (t <= 0) return 10'd0;
    if (t >= 1023) return 10'd1023;
    return 10'(t);
  endfunction

  initial begin
    for (int i = 0; i < 512; i++) begin
      ped[i] = (i % 7 == 0) ? -10'sd512 : (i % 11 == 0) ? 10'sd511 : 10'($urandom);
      @(negedge clk); we = 1; waddr = 9'(i); wdata = ped[i];
    end
    @(negedge clk) we = 0;
    for (int r = 0; r < 6; r++)
      for (int i = 0; i < 512; i++) begin
        idx = 9'(i);
        raw = (r == 0) ? 10'd0 : (r == 1) ? 10'd1023 : 10'($urandom);
        #1 `CHECK(sub == expect_sub(raw, ped[i]),
                  $sformatf("idx %0d raw %0d ped %0d: %0d", i, raw, ped[i], sub))
      end
    `FINISH
  end
endmodule
