// Testbench for supernova_meter (gate shortened to 2^6 clocks, dead-time
// unit to 2 clocks): random SPE/MPE hits are counted by a reference model of
// the slot, dead-time and packing rules; every Supernova Data word and its
// update pulse are compared, and the timestamp field is checked against the
// system time at the end of slot 3.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_supernova_meter;
  localparam int GB = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [47:0] systime;
  logic [1:0] enable = 0;
  logic [6:0] deadtime = 0;
  logic hit_spe = 0, hit_mpe = 0, update;
  logic [31:0] data;
  always #12.5 clk = ~clk;
  supernova_meter #(.GATE_BITS(GB), .DT_UNIT(2)) dut (.clk, .rst_n, .systime, .enable, .deadtime,
                                                      .hit_spe, .hit_mpe, .data, .update);
  initial begin #5_000_000; failures++; `FINISH end

  int mcnt, mdt, mslot, words;
  logic [3:0] ms [4];
  logic [31:0] mword;
  logic mupd;
  logic h;
  initial systime = 48'h0000_1234_FFC0 - 48'd5;
  always_ff @(posedge clk) systime <= systime + 1'b1;
  initial begin
    mcnt = 0; mdt = 0; mslot = 0; words = 0; mupd = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    enable = 1; deadtime = 3;            // 8 clocks of dead time
    for (int c = 0; c < 64 * 24; c++) begin
      hit_spe = ($urandom % 3) == 0;
      hit_mpe = ($urandom % 7) == 0;
      if (c == 64 * 12) enable = 0;      // off for a moment, then MPE
      if (c == 64 * 12 + 3) enable = 2;
      @(posedge clk);
      // reference model sampled at this edge
      mupd = 0;
      h = (enable == 1) ? hit_spe : (enable == 2) ? hit_mpe : 1'b0;
      if (h && mdt == 0) begin
        if (mcnt < 15) mcnt++;
        mdt = (deadtime + 1) * 2 - 1;
      end else if (mdt != 0) mdt--;
      if (enable == 0) begin
        mcnt = 0; mslot = 0;
      end else if (systime[GB-1:0] == 0) begin
        ms[mslot] = 4'(mcnt);
        mcnt = 0;
        if (mslot == 3) begin
          mword = {systime[31:16], ms[3], ms[2], ms[1], ms[0]};
          mupd = 1; mslot = 0;
        end else mslot++;
      end
      #1;
      `CHECK(update == mupd, $sformatf("update %0b expected %0b", update, mupd))
      if (update) begin
        words++;
        `CHECK(data == mword, $sformatf("data %h expected %h", data, mword))
      end
    end
    `CHECK(words >= 5, $sformatf("only %0d words", words))
    `FINISH
  end
endmodule
