// comm_dpm_ctrl: bookkeeping of the communication ring buffers.
//
// Messages to and from the surface pass through two 32 kB ring buffers in
// the dual-ported memory (transmit at DPM offset 0, receive at 32 kB), each
// 8192 words of 32 bits of which the low 8 bits are used. The CPU and the
// communication engine each own one pointer of each ring:
//   * TX: the CPU writes tx_head (Communication tx_dpr_wadr) after placing
//     ONE complete message; the engine advances tx_tail as it sends.
//   * RX: the engine advances rx_head as it receives; the CPU writes rx_tail
//     (rx_dpr_radr) after reading ONE complete message.
// This block holds the CPU-owned pointers, counts messages waiting to be
// sent and packets waiting in the RX buffer (engine "packet received" +1,
// CPU rx_tail write -1), and forms the Communication Status word:
//   bit 0 reboot granted, 1 packet sent (no message waiting), 2 TX buffer
//   almost empty, 3 packet received (RX packet count non-zero),
//   4 communication reset received, 5 RX buffer almost full,
//   6 communication available. Bits 31..7 are unused and read 0; bits 0,
//   4 and 6 are the engine's own flags, passed straight through.
// A write to tx_head pulses tx_msg_ready to the engine.
//
// From the specification: the ring layout, the pointer names and owners,
// the meaning of writing tx_head and rx_tail, and the status bit list.
// This design's own: the counters' widths, the almost-empty/almost-full
// thresholds (ALMOST words) and the engine-side pulse signals.
module comm_dpm_ctrl #(
  parameter int unsigned AW     = 13,    // 8192 words per ring
  parameter int unsigned ALMOST = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU side
  input  logic          tx_head_wr,
  input  logic [AW-1:0] tx_head_wdata,
  input  logic          rx_tail_wr,
  input  logic [AW-1:0] rx_tail_wdata,
  output logic [AW-1:0] tx_head,
  output logic [AW-1:0] rx_tail,
  output logic [15:0]   rx_pkts,
  output logic [15:0]   tx_msgs,
  output logic [31:0]   status,
  // communication engine side
  output logic          tx_msg_ready,
  input  logic [AW-1:0] tx_tail,
  input  logic          pkt_sent,
  input  logic [AW-1:0] rx_head,
  input  logic          pkt_rcvd,
  input  logic          reboot_granted,
  input  logic          comm_reset_rcvd,
  input  logic          comm_avail
);
  logic [AW-1:0] tx_used, rx_used;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_head      <= '0;
      rx_tail      <= '0;
      rx_pkts      <= '0;
      tx_msgs      <= '0;
      tx_msg_ready <= 1'b0;
    end else begin
      tx_msg_ready <= tx_head_wr;
      if (tx_head_wr) tx_head <= tx_head_wdata;
      if (rx_tail_wr) rx_tail <= rx_tail_wdata;
      rx_pkts <= rx_pkts + 16'(pkt_rcvd) - 16'(rx_tail_wr && rx_pkts != 0);
      tx_msgs <= tx_msgs + 16'(tx_head_wr) - 16'(pkt_sent && tx_msgs != 0);
    end

  assign tx_used = tx_head - tx_tail;
  assign rx_used = rx_head - rx_tail;

  always_comb begin
    status    = '0;
    status[0] = reboot_granted;
    status[1] = (tx_msgs == 0);
    status[2] = (32'(tx_used) < ALMOST);
    status[3] = (rx_pkts != 0);
    status[4] = comm_reset_rcvd;
    status[5] = (32'(rx_used) > (2**AW - 1 - ALMOST));
    status[6] = comm_avail;
  end
endmodule
