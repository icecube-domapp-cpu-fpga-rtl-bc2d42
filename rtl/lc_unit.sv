// lc_unit: local coincidence (LC) between neighbouring DOMs.
//
// Sending: when the discriminator selected by LC Control bit 7 (0 SPE,
// 1 MPE) fires, a one-clock LC pulse goes to the upper and/or lower
// neighbour, as enabled by bits 0 and 1.
//
// Receiving: for every ATWD launch the unit decides whether an LC signal
// from above and/or below belongs to it. A pulse received from a neighbour
// (enabled by bits 2 and 3) counts when it arrives
//   * in the pre window: the (PreWindow+1) clocks ending with the launch
//     clock, or
//   * in the post window: the (PostWindow+1) clocks after the launch,
//     lengthened by the cable delay of that direction. The delay is the
//     Neighbor Distance entry of the LC Cable Length Up/Down register
//     selected by the LC length (span) field, in 25 ns units.
// Windows thus range from 25 ns to 1.6 us in 25 ns steps.
//
// Self LC: if the Self LC Mode selects a discriminator (1 SPE, 2 MPE) and it
// fires within Self LC Window clocks after the launch, the event counts as
// coincident without its neighbours.
//
// When the longest of these windows has closed, `done` pulses for one clock
// with got_up, got_down, self_hit and lc_ok; lc_ok applies bit 6 (require LC
// from above and below) and the self LC rule.
//
// Following the specification: the register fields, window ranges and
// the cable-length compensation. This design's own: a single decision in
// flight (a new launch restarts it), the LC signalling as one-clock pulses,
// and the use of only the span's own cable entry as the delay (the
// specification bounds the self window by "the longest LC cable length for
// the set LC length", which is that entry when distances grow with span).
module lc_unit
  import domapp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  lc_reg_t     cfg,
  input  logic [31:0] cable_up,
  input  logic [31:0] cable_dn,
  input  logic        disc_spe,    // one-clock discriminator pulses
  input  logic        disc_mpe,
  input  logic        launch,      // ATWD launch
  input  logic        rx_up,       // one-clock LC pulses from neighbours
  input  logic        rx_down,
  output logic        tx_up,
  output logic        tx_down,
  output logic        done,
  output logic        got_up,
  output logic        got_down,
  output logic        self_hit,
  output logic        lc_ok
);
  logic       disc_sel, self_disc, rx_u, rx_d;
  logic [6:0] age_up, age_dn;      // clocks since the last pulse, saturating
  logic       seen_up, seen_dn;    // a pulse has ever been seen
  logic       busy;
  logic [7:0] cnt;                 // clocks since the launch
  logic [7:0] end_up, end_dn, end_self, end_all;
  logic       hit_u, hit_d, hit_s;

  assign disc_sel  = cfg.disc_mpe ? disc_mpe : disc_spe;
  assign self_disc = (cfg.self_mode == 2'd1) ? disc_spe :
                     (cfg.self_mode == 2'd2) ? disc_mpe : 1'b0;
  assign rx_u = rx_up   && cfg.rx_up;
  assign rx_d = rx_down && cfg.rx_down;

  assign end_up   = 8'(cfg.post_win) + 8'd1 + 8'(cable_up[cfg.span*8 +: 7]);
  assign end_dn   = 8'(cfg.post_win) + 8'd1 + 8'(cable_dn[cfg.span*8 +: 7]);
  assign end_self = 8'(cfg.self_win);
  always_comb begin
    end_all = end_up;
    if (end_dn   > end_all) end_all = end_dn;
    if (end_self > end_all) end_all = end_self;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_up   <= 1'b0;
      tx_down <= 1'b0;
      age_up  <= '1;
      age_dn  <= '1;
      seen_up <= 1'b0;
      seen_dn <= 1'b0;
    end else begin
      tx_up   <= disc_sel && cfg.tx_up;
      tx_down <= disc_sel && cfg.tx_down;
      if (rx_u) begin age_up <= '0; seen_up <= 1'b1; end
      else if (age_up != '1) age_up <= age_up + 1'b1;
      if (rx_d) begin age_dn <= '0; seen_dn <= 1'b1; end
      else if (age_dn != '1) age_dn <= age_dn + 1'b1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= '0;
      hit_u <= 1'b0;
      hit_d <= 1'b0;
      hit_s <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (launch) begin
        // pre window: this clock and the PreWindow clocks before it
        busy  <= 1'b1;
        cnt   <= 8'd1;
        hit_u <= rx_u || (seen_up && age_up < 7'(cfg.pre_win));
        hit_d <= rx_d || (seen_dn && age_dn < 7'(cfg.pre_win));
        hit_s <= 1'b0;
      end else if (busy) begin
        if (rx_u && cnt <= end_up)   hit_u <= 1'b1;
        if (rx_d && cnt <= end_dn)   hit_d <= 1'b1;
        if (self_disc && cnt <= end_self) hit_s <= 1'b1;
        if (cnt >= end_all) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end

  // results, valid while done is high (and held until the next launch)
  assign got_up   = hit_u;
  assign got_down = hit_d;
  assign self_hit = hit_s;
  assign lc_ok    = hit_s || (cfg.need_both ? (hit_u && hit_d) : (hit_u || hit_d));
endmodule
