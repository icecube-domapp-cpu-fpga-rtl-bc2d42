// Testbench for comm_dpm_ctrl: message and packet counting from CPU pointer
// writes and engine pulses, the status bits and the tx_msg_ready pulse.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_comm_dpm_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic tx_head_wr = 0, rx_tail_wr = 0, pkt_sent = 0, pkt_rcvd = 0;
  logic [12:0] tx_head_wdata = 0, rx_tail_wdata = 0, tx_tail = 0, rx_head = 0;
  logic [12:0] tx_head, rx_tail;
  logic [15:0] rx_pkts, tx_msgs;
  logic [31:0] status;
  logic tx_msg_ready, rg = 0, crr = 0, ca = 0;
  always #12.5 clk = ~clk;
  comm_dpm_ctrl dut (.clk, .rst_n, .tx_head_wr, .tx_head_wdata, .rx_tail_wr, .rx_tail_wdata,
                     .tx_head, .rx_tail, .rx_pkts, .tx_msgs, .status, .tx_msg_ready,
                     .tx_tail, .pkt_sent, .rx_head, .pkt_rcvd, .reboot_granted(rg),
                     .comm_reset_rcvd(crr), .comm_avail(ca));
  initial begin #1_000_000; failures++; `FINISH end

  int m_rx, m_tx;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    `CHECK(status[1] && status[2] && !status[3] && !status[5], $sformatf("idle status %h", status))
    // CPU queues a 100-word message
    tx_head_wr = 1; tx_head_wdata = 13'd100;
    @(negedge clk) tx_head_wr = 0;
    `CHECK(tx_msg_ready, "tx_msg_ready follows the tx_head write")
    `CHECK(tx_head == 100 && tx_msgs == 1 && !status[1], "one message waiting")
    @(negedge clk);
    `CHECK(!tx_msg_ready, "tx_msg_ready is one clock")
    // a long message fills the ring beyond the almost-empty level
    tx_head_wr = 1; tx_head_wdata = 13'd3000;
    @(negedge clk) tx_head_wr = 0;
    `CHECK(tx_msgs == 2 && !status[2], "TX not almost empty")
    tx_tail = 13'd100; pkt_sent = 1;
    @(negedge clk) pkt_sent = 0;
    `CHECK(tx_msgs == 1, "one sent")
    tx_tail = 13'd3000; pkt_sent = 1;
    @(negedge clk) pkt_sent = 0;
    `CHECK(tx_msgs == 0 && status[1] && status[2], "all sent")
    // random RX traffic against a counter model
    m_rx = 0;
    for (int i = 0; i < 300; i++) begin
      pkt_rcvd = ($urandom % 3) == 0;
      rx_tail_wr = ($urandom % 4) == 0;
      if (pkt_rcvd) rx_head = rx_head + 13'd20;
      if (rx_tail_wr) rx_tail_wdata = rx_tail_wdata + 13'd1;
      m_rx = m_rx + int'(pkt_rcvd) - int'(rx_tail_wr && m_rx != 0);
      @(negedge clk);
      `CHECK(rx_pkts == 16'(m_rx) && status[3] == (m_rx != 0), $sformatf("rx packets %0d expected %0d", rx_pkts, m_rx))
    end
    pkt_rcvd = 0; rx_tail_wr = 0;
    rx_head = rx_tail + 13'd8000;
    #1 `CHECK(status[5], "RX almost full")
    rg = 1; crr = 1; ca = 1;
    #1 `CHECK(status[0] && status[4] && status[6], "engine status bits")
    `FINISH
  end
endmodule
