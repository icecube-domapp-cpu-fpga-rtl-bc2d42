// interrupt_ctrl: the FPGA-to-CPU interrupt sources.
//
// The Excalibur offers six interrupt lines to the CPU. Each line has an
// enable bit (Interrupt Enable register) and a pending bit. A source pulse
// sets its pending bit only when the line is enabled; disabling a line
// clears its pending bit, as does writing a 1 to that bit of the Interrupt
// ACK register (writes there are self clearing: nothing is stored but the
// clear). Reading Interrupt ACK returns the pending bits. These rules follow
// the specification; the level-sensitive interrupt outputs (irq = pending)
// are this design's choice.
//
// Timing: a source pulse in cycle t shows on irq from cycle t+1. A write in
// cycle t takes effect in cycle t+1; a source pulse and an ACK of the same
// bit in one cycle leave the bit pending.
module interrupt_ctrl #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] src,       // one-cycle source pulses
  input  logic         en_wr,
  input  logic [N-1:0] en_wdata,
  input  logic         ack_wr,
  input  logic [N-1:0] ack_wdata,
  output logic [N-1:0] enable,
  output logic [N-1:0] pending,
  output logic [N-1:0] irq
);
  logic [N-1:0] en_next;
  assign en_next = en_wr ? en_wdata : enable;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      enable  <= '0;
      pending <= '0;
    end else begin
      enable  <= en_next;
      pending <= ((pending & ~(ack_wr ? ack_wdata : '0)) | src) & en_next;
    end

  assign irq = pending;
endmodule
