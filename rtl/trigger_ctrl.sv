// trigger_ctrl: ATWD trigger formation and ping-pong launch.
//
// Every source enabled in the Trigger Source register can launch an ATWD;
// the enabled sources are ORed. Sources: bit 0 SPE and bit 1 MPE
// discriminator, bits 2..7 the calibration launches (2 "Dark"/CPU forced,
// 3 front-end pulser, 4 LED, 5 flasher board, 6 front-end R2R, 7 ATWD R2R),
// bits 8/9 an LC pulse received from above/below. When both discriminators
// are enabled only SPE can trigger, as the specification requires.
//
// A trigger launches one of the two ATWDs if data taking is enabled (DAQ
// bit 0) and that ATWD is enabled (bits 1/2) and not busy. The two ATWDs
// are used alternately (ping-pong); if the preferred one cannot take the
// trigger the other does, and if neither can, the trigger is dropped. With
// the launch the block presents the trigger-source word for the event
// header (16 bits; bits 15..10 are unused and stay 0) and whether the
// launch came from a calibration source (for the LC heart-beat rule).
//
// The OR of the sources and SPE priority follow the specification. The
// mapping of the calibration sources onto trigger bits 2..7, the alternation
// between the ATWDs and the one-clock registered launch are this design's
// choices.
module trigger_ctrl
  import domapp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  trig_src,     // Trigger Source register
  input  daq_reg_t    daq,
  input  logic        disc_spe,     // one-clock pulses
  input  logic        disc_mpe,
  input  logic        cal_launch,
  input  logic [5:0]  cal_src,
  input  logic        lc_rx_up,
  input  logic        lc_rx_down,
  input  logic        busy_a,
  input  logic        busy_b,
  output logic        launch_a,
  output logic        launch_b,
  output logic [15:0] ev_trig,
  output logic        ev_is_cal,
  output logic        dropped       // a trigger found no free ATWD
);
  logic [9:0] fired;
  logic       any, can_a, can_b, pick_a, pick_b, last_b;

  always_comb begin
    fired = '0;
    fired[TS_SPE] = disc_spe;
    fired[TS_MPE] = disc_mpe && !trig_src[TS_SPE];
    if (cal_launch) fired[7:2] = cal_src;
    fired[TS_LC_UP]   = lc_rx_up;
    fired[TS_LC_DOWN] = lc_rx_down;
    fired = fired & trig_src;
  end

  assign any    = (fired != '0) && daq.enable;
  assign can_a  = daq.atwd_a_en && !busy_a;
  assign can_b  = daq.atwd_b_en && !busy_b;
  assign pick_a = any && can_a && (last_b || !can_b);
  assign pick_b = any && can_b && !pick_a;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      launch_a  <= 1'b0;
      launch_b  <= 1'b0;
      ev_trig   <= '0;
      ev_is_cal <= 1'b0;
      dropped   <= 1'b0;
      last_b    <= 1'b1;
    end else begin
      launch_a <= pick_a;
      launch_b <= pick_b;
      dropped  <= any && !pick_a && !pick_b;
      if (pick_a || pick_b) begin
        ev_trig   <= {6'd0, fired};
        ev_is_cal <= (fired[7:2] != '0);
        last_b    <= pick_b;
      end
    end

  a_rule: assert property (@(posedge clk) disable iff (!rst_n) !(launch_a && launch_b))
    else $error("trigger_ctrl: both ATWDs launched at once");
endmodule
