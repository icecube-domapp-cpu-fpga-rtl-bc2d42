// calib_ctrl: calibration source sequencer and R2R ladder pattern player.
//
// The Calibration Source Control register selects which sources flash
// (bit 0 "Dark", 1 front-end pulser, 2 on-board LED, 3 flasher board,
// 4 front-end R2R ladder, 5 ATWD R2R ladder), when they flash (Calibration
// Mode: off, repeating, time match, CPU forced), the ATWD launch offset
// (bits 19..16, two's complement -8..+7 clocks) and the pulser rate
// (bits 28..24, 0..17).
//
//  * Repeating: a flash at the rate 2^PulserRate / (25 ns * 2^26), i.e.
//    every 2^(26-PulserRate) clocks, at the low-to-high edges of systime
//    bit 25-PulserRate (counting bits from 0; counted from 1 this is the
//    bit "26 - PulserRate" of the specification's shorthand).
//  * Time match: once, when systime[31:0] equals Calibration Time. The
//    match is armed by moving the mode from OFF to time match.
//  * CPU forced: when the CPU writes 0xA5 into the low byte of Calibration
//    CPU Launch.
//
// Timing. So that a negative launch offset can fire the ATWD before the
// flash, events are detected LEAD clocks ahead: a flash event decided while
// systime = S has the nominal time T = S + LEAD, which is what "Last
// Calibration Flash Time" records. The flash outputs pulse in the cycle in
// which systime = T + 2 (the actual flash is two clocks after the recorded
// time), and the ATWD launch pulses at systime = T + 2 + offset, so the
// offset is t_launch - t_flash as the specification defines it. For CPU
// forced flashes the write cycle is S. `irq` pulses with the flash.
//
// The R2R pattern memory (256 x 8 bit, written by the CPU) is played out
// once per flash, one entry per clock (40 MSample/s), starting in the flash
// cycle: to the ATWD R2R bus when source 5 is on, and split into
// FE_pulser_N = pattern[3:0], FE_pulser_P = pattern[7:4] when source 4 is
// on. Idle outputs are 0.
//
// What is this design's own: LEAD, the pulse width of one clock for the
// pulser, LED and flasher triggers, flashes being ignored while a previous
// flash is still in its launch pipeline, and the idle level of the R2R
// outputs.
module calib_ctrl #(
  parameter int unsigned LEAD = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] systime,
  input  logic [31:0] ctrl,          // Calibration Source Control register
  input  logic [31:0] cal_time,      // Calibration Time register
  input  logic        cpu_launch_wr, // write to Calibration CPU Launch
  input  logic [7:0]  cpu_launch_data,
  input  logic        pat_we,        // R2R pattern memory write port
  input  logic [7:0]  pat_addr,
  input  logic [7:0]  pat_wdata,
  output logic        fe_pulser,     // flash pulses
  output logic        led,
  output logic        flasher,
  output logic [7:0]  atwd_r2r,      // ATWD R2R ladder bus
  output logic [3:0]  fe_pulser_n,   // front-end R2R ladder
  output logic [3:0]  fe_pulser_p,
  output logic        r2r_active,
  output logic        atwd_launch,   // forced ATWD launch
  output logic [5:0]  launch_src,    // sources of that launch
  output logic [47:0] last_flash,
  output logic        irq
);
  import domapp_pkg::*;

  localparam int unsigned SR_LEN = LEAD + 2 + 8;   // covers offset +7

  logic [5:0]  src;
  cal_mode_e   mode;
  logic [3:0]  offset;
  logic [4:0]  rate;
  assign src    = ctrl[5:0];
  assign mode   = cal_mode_e'(ctrl[14:12]);
  assign offset = ctrl[19:16];
  assign rate   = ctrl[28:24];

  // ---------------------------------------------------- event detection
  logic [47:0] ahead;
  logic [5:0]  bitsel;
  logic        rep_bit, rep_bit_q;
  logic        armed;
  cal_mode_e   mode_q;
  logic        evt;
  logic [SR_LEN-1:0] sr;
  logic [5:0]  src_q;

  assign ahead   = systime + 48'(LEAD);
  assign bitsel  = 6'd25 - 6'((rate > 5'd17) ? 5'd17 : rate);
  assign rep_bit = ahead[bitsel];

  always_comb begin
    evt = 1'b0;
    unique case (mode)
      CAL_REPEAT: evt = rep_bit && !rep_bit_q;
      CAL_TMATCH: evt = armed && (ahead[31:0] == cal_time);
      CAL_CPU:    evt = cpu_launch_wr && (cpu_launch_data == 8'hA5);
      default:    evt = 1'b0;
    endcase
    if (src == '0 || sr != '0) evt = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rep_bit_q  <= 1'b0;
      armed      <= 1'b0;
      mode_q     <= CAL_OFF;
      sr         <= '0;
      src_q      <= '0;
      last_flash <= '0;
    end else begin
      rep_bit_q <= (mode == CAL_REPEAT) ? rep_bit : 1'b1;
      mode_q    <= mode;
      if (mode == CAL_TMATCH && mode_q == CAL_OFF) armed <= 1'b1;
      else if (mode != CAL_TMATCH)                  armed <= 1'b0;
      else if (evt)                                 armed <= 1'b0;
      sr <= {sr[SR_LEN-2:0], evt};
      if (evt) begin
        src_q      <= src;
        last_flash <= ahead;
      end
    end

  // ------------------------------------------------------------ outputs
  // the launch leaves the pipeline at tap LEAD+offset, one clock before
  // the registered output
  int unsigned launch_tap;
  assign launch_tap = unsigned'(int'(LEAD) + int'($signed(offset)));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fe_pulser   <= 1'b0;
      led         <= 1'b0;
      flasher     <= 1'b0;
      atwd_launch <= 1'b0;
      launch_src  <= '0;
      irq         <= 1'b0;
    end else begin
      fe_pulser   <= sr[LEAD] && src_q[1];
      led         <= sr[LEAD] && src_q[2];
      flasher     <= sr[LEAD] && src_q[3];
      irq         <= sr[LEAD];
      atwd_launch <= sr[launch_tap];
      launch_src  <= src_q;
    end

  // -------------------------------------------------- R2R pattern player
  logic [7:0] pattern [256];
  logic [8:0] play_idx;
  logic       playing;
  logic [7:0] pat_q;

  always_ff @(posedge clk)
    if (pat_we) pattern[pat_addr] <= pat_wdata;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      playing  <= 1'b0;
      play_idx <= '0;
      pat_q    <= '0;
    end else if (sr[LEAD] && (src_q[4] || src_q[5])) begin
      playing  <= 1'b1;
      play_idx <= 9'd1;
      pat_q    <= pattern[8'd0];
    end else if (playing && play_idx != 9'd256) begin
      play_idx <= play_idx + 1'b1;
      pat_q    <= pattern[play_idx[7:0]];
    end else begin
      playing  <= 1'b0;
      pat_q    <= '0;
    end

  assign r2r_active  = playing;
  assign atwd_r2r    = (playing && src_q[5]) ? pat_q : '0;
  assign fe_pulser_n = (playing && src_q[4]) ? pat_q[3:0] : '0;
  assign fe_pulser_p = (playing && src_q[4]) ? pat_q[7:4] : '0;

endmodule
