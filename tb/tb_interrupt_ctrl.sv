// Testbench for interrupt_ctrl: enable gating, pending latch, write-1-to-
// clear ACK, clearing by disable, and a random sequence against a model.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_interrupt_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0] src = 0, en_wdata = 0, ack_wdata = 0, enable, pending, irq;
  logic en_wr = 0, ack_wr = 0;
  logic [5:0] m_en, m_pend;
  always #12.5 clk = ~clk;
  interrupt_ctrl dut (.clk, .rst_n, .src, .en_wr, .en_wdata, .ack_wr, .ack_wdata,
                      .enable, .pending, .irq);
  initial begin #2_000_000; failures++; `FINISH end

  task automatic step(input logic [5:0] s, input logic ew, input logic [5:0] ed,
                      input logic aw, input logic [5:0] ad);
    src = s; en_wr = ew; en_wdata = ed; ack_wr = aw; ack_wdata = ad;
    @(posedge clk);
    // reference model
    if (ew) m_en = ed;
    m_pend = ((m_pend & ~(aw ? ad : 6'd0)) | s) & m_en;
    #1;
    src = 0; en_wr = 0; ack_wr = 0;
    `CHECK(enable == m_en && pending == m_pend && irq == m_pend,
           $sformatf("en %b pend %b expected %b %b", enable, pending, m_en, m_pend))
  endtask

  initial begin
    m_en = 0; m_pend = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(6'b000001, 0, 0, 0, 0);            // disabled source is ignored
    `CHECK(irq == 0, "no irq while disabled")
    step(0, 1, 6'b000111, 0, 0);            // enable 0..2
    step(6'b000101, 0, 0, 0, 0);            // sources 0 and 2 fire
    `CHECK(irq == 6'b000101, "pending 0 and 2")
    step(0, 0, 0, 1, 6'b000001);            // ack 0
    `CHECK(irq == 6'b000100, "ack clears bit 0 only")
    step(0, 1, 6'b000011, 0, 0);            // disable 2 clears it
    `CHECK(irq == 6'b000000, "disable clears pending")
    step(6'b000010, 0, 0, 1, 6'b000010);    // source and ack together
    `CHECK(irq == 6'b000010, "set wins over simultaneous ack")
    repeat (400)
      step(6'($urandom), ($urandom % 8) == 0, 6'($urandom), ($urandom % 3) == 0, 6'($urandom));
    `FINISH
  end
endmodule
