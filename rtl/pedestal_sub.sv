// pedestal_sub: ATWD pedestal pattern memory and pedestal subtraction.
//
// One instance serves one ATWD. The memory holds a 10-bit signed pedestal
// for each of the 4 channels x 128 samples, written by the CPU. Entries are
// stored in the order the ATWD reads samples out: index ch*128 + k holds
// the pedestal of sample 127-k of channel ch, so the lowest address holds
// the last sample, as the specification lays out the pattern.
//
// For each raw (unsigned 10-bit) sample the block computes
// raw - pedestal and clamps it to 0 when the difference is 0 or less, and to
// 1023 when it is 1023 or more; otherwise the difference passes. This is the
// subtraction rule of the specification. A pattern of zeros leaves the data
// unchanged.
//
// Timing: the read is asynchronous, so `sub` follows `idx` and `raw` in the
// same cycle (a small distributed RAM; this design's choice).
module pedestal_sub #(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [9:0]               wdata,
  input  logic [$clog2(DEPTH)-1:0] idx,
  input  logic [9:0]               raw,
  output logic [9:0]               sub
);
  logic signed [9:0]  ped [DEPTH];
  logic signed [11:0] diff;

  always_ff @(posedge clk)
    if (we) ped[waddr] <= wdata;

  assign diff = $signed({2'b00, raw}) - 12'(ped[idx]);

  always_comb
    if (diff <= 0)            sub = '0;
    else if (diff >= 12'sd1023) sub = 10'd1023;
    else                      sub = diff[9:0];
endmodule
