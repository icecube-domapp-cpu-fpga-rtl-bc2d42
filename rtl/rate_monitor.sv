// rate_monitor: discriminator rate meter with a fixed gate and an
// artificial dead time.
//
// The meter counts discriminator hits during a gate of one second
// (GATE_CYCLES clocks of 25 ns) and, at the end of each gate, loads the
// count into the 16-bit result register (saturating at 0xFFFF) and pulses
// `update` (the "Rate Meter Update" interrupt source). After each counted
// hit further hits are ignored for (deadtime+1)*100 ns, the artificial
// discriminator dead time of the Rate Monitor Control register (100 ns to
// 102.4 us in 100 ns steps). Gate length, dead-time range and result width
// follow the specification. Saturation, the free-running gate and counting
// only while enabled are this design's choices; a disabled meter reports 0.
//
// Timing: `hit` is a one-cycle pulse per discriminator crossing. The result
// changes in the cycle after the gate's last cycle, together with `update`.
module rate_monitor #(
  parameter int unsigned GATE_CYCLES = 40_000_000,  // 1 s at 40 MHz
  parameter int unsigned DT_UNIT     = 4            // 100 ns in clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [9:0]  deadtime,
  input  logic        hit,
  output logic [15:0] rate,
  output logic        update
);
  localparam int unsigned GW = $clog2(GATE_CYCLES + 1);
  logic [GW-1:0] gate_cnt;
  logic [15:0]   cnt;
  logic [15:0]   dt_cnt;    // remaining dead time, in clocks
  logic          gate_end;
  logic          take;

  assign gate_end = (gate_cnt == GW'(GATE_CYCLES - 1));
  assign take     = enable && hit && (dt_cnt == 0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      gate_cnt <= '0;
      cnt      <= '0;
      dt_cnt   <= '0;
      rate     <= '0;
      update   <= 1'b0;
    end else begin
      update <= gate_end;
      if (take)
        dt_cnt <= 16'((32'(deadtime) + 1) * DT_UNIT - 1);
      else if (dt_cnt != 0)
        dt_cnt <= dt_cnt - 1'b1;
      if (gate_end) begin
        gate_cnt <= '0;
        rate     <= (take && cnt != 16'hFFFF) ? cnt + 1'b1 : cnt;
        cnt      <= '0;
      end else begin
        gate_cnt <= gate_cnt + 1'b1;
        if (take && cnt != 16'hFFFF) cnt <= cnt + 1'b1;
      end
    end
endmodule
