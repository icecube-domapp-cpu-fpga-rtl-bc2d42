// supernova_meter: continuous discriminator counting in fixed time slots.
//
// The meter counts hits of the selected discriminator (enable = 1: SPE,
// 2: MPE, 0: off) in consecutive gates of 2^16 clocks (1.6384 ms). Each
// counted hit is followed by a dead time of (deadtime+1)*6.4 us (256 clocks
// per step) in which hits are ignored. Four consecutive 4-bit slot counts
// are packed, with systime bits 31..16 at the end of the fourth slot, into
// the Supernova Data word {ts[31:16], slot3, slot2, slot1, slot0}, and
// `update` pulses (the "Supernova Data Updated" interrupt source).
//
// Gates are aligned to the system time: a slot ends when systime[15:0]
// steps from 0x0000 to 0x0001, so systime bits 15..0 read 0x0001 at the end
// of every slot, which is the alignment the specification gives for slot 0.
// Gate length, dead time and word layout follow the specification; slot
// counts saturating at 15 and slot 0 being the first slot after the meter
// is enabled (or after the previous word) are this design's choices.
//
// GATE_BITS may be lowered for simulation; at the default the gate is 2^16.
module supernova_meter #(
  parameter int unsigned GATE_BITS = 16,
  parameter int unsigned DT_UNIT   = 256   // 6.4 us in clocks
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] systime,
  input  logic [1:0]  enable,      // 0 off, 1 SPE, 2 MPE
  input  logic [6:0]  deadtime,
  input  logic        hit_spe,
  input  logic        hit_mpe,
  output logic [31:0] data,
  output logic        update
);
  logic        hit, take, slot_end;
  logic [3:0]  cnt;
  logic [1:0]  slot;
  logic [11:0] packed_cnt;          // slots 0..2 of the running word
  logic [15:0] dt_cnt;

  assign hit      = (enable == 2'd1) ? hit_spe : (enable == 2'd2) ? hit_mpe : 1'b0;
  assign take     = hit && (dt_cnt == 0);
  assign slot_end = (systime[GATE_BITS-1:0] == '0);

  logic [3:0] cnt_final;
  assign cnt_final = (take && cnt != 4'hF) ? cnt + 1'b1 : cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt        <= '0;
      slot       <= '0;
      packed_cnt <= '0;
      dt_cnt     <= '0;
      data       <= '0;
      update     <= 1'b0;
    end else begin
      update <= 1'b0;
      if (take)
        dt_cnt <= 16'((32'(deadtime) + 1) * DT_UNIT - 1);
      else if (dt_cnt != 0)
        dt_cnt <= dt_cnt - 1'b1;
      if (enable == 2'd0) begin
        cnt  <= '0;
        slot <= '0;
      end else if (slot_end) begin
        cnt <= '0;
        if (slot == 2'd3) begin
          data   <= {systime[31:16], cnt_final, packed_cnt};
          update <= 1'b1;
          slot   <= '0;
        end else begin
          packed_cnt[slot*4 +: 4] <= cnt_final;
          slot <= slot + 1'b1;
        end
      end else if (take && cnt != 4'hF) begin
        cnt <= cnt + 1'b1;
      end
    end
endmodule
