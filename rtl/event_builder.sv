// event_builder: formats raw events and writes them to the look back memory.
//
// The look back memory (LBM) is an 8 MB region of the CPU's SDRAM
// (0x0100_0000..0x01FF_FFFF) that the FPGA fills by DMA through the
// PLD-to-stripe bridge with 32-bit writes. Each event occupies a 2 kB block:
//   +0x000  header, 4 words (timestamp, trigger word, dead time)
//   +0x010  FADC samples 0..255, two 10-bit samples per word
//           (even sample in bits 9..0, odd sample in bits 25..16)
//   +0x210  ATWD channels 0..3, 64 words each, samples in read-out order
//           127..0, again two per word
// The header follows the Raw Data Format tables:
//   word 0 = {16'h0001, timestamp[15:0]}, word 1 = timestamp[47:16],
//   word 2 = {LC from up (25), LC from down (24), ATWD size (20:19),
//             ATWD available (18), FADC available (17), ATWD A/B (16),
//             trigger source (15:0)},
//   word 3 = dead time: clocks from the ATWD launch to the first sample
//            entering the builder.
//
// Flow. A launch of ATWD A or B (from trigger_ctrl) records the event's
// timestamp and trigger word and marks that ATWD busy. The digitizer front
// end then delivers the event as a stream of 768 samples (valid/ready):
// 256 FADC samples, then 4 ATWD channels x 128 samples in read-out order.
// ATWD samples pass through that ATWD's pedestal subtraction. Which parts
// are stored follows the DAQ register: DAQ mode (ATWD & FADC, FADC only,
// timestamp only) and ATWD mode (normal: channel 0, then channel n+1 only if
// channel n overflowed, up to channel 2; testing and debugging: all four
// channels). Data words are written as they are formed, the header last,
// once the ATWD size and the LC outcome are known. The LC mode then decides:
// OFF keeps every event; HARD drops an event without LC (its block is simply
// reused by the next event); SOFT (and FLABBY) keeps only the header of an
// event without LC. Calibration-triggered events need no LC unless the
// heart-beat mode is disabled (DAQ bit 19), and timestamp-only events never
// use LC. A kept event advances the LBM byte pointer by 2 kB.
//
// LBM modes: "wrap endless" writes at pointer modulo LBM_SIZE; "stop when
// buffer full" stops taking events once the pointer reaches LBM_SIZE, so
// the digitizer stream backs up. A pointer reset (LBM Control bit 0) takes
// effect at the start of the next 2 kB block.
//
// From the specification: the LBM region and block size, the data layout,
// the header fields, the DAQ/ATWD/LC/LBM mode meanings and the pointer
// reset rule. This design's own: the sample stream and write port
// handshakes, the overflow level OVF_LEVEL, FLABBY treated as SOFT, modes
// marked TBD treated as the first mode, one event processed at a time, and
// the dead-time end point (first sample accepted). Compression modes are
// not built: all events are stored raw.
module event_builder
  import domapp_pkg::*;
#(
  parameter int unsigned LBM_SIZE  = 8 * 1024 * 1024,  // bytes, power of 2
  parameter logic [9:0]  OVF_LEVEL = 10'd768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [47:0] systime,
  input  daq_reg_t    daq,
  input  logic        lbm_rst,       // LBM Control write with bit 0 set
  // launches
  input  logic        launch_a,
  input  logic        launch_b,
  input  logic [15:0] ev_trig,
  input  logic        ev_is_cal,
  // local coincidence outcome of the latest launch
  input  logic        lc_done,
  input  logic        lc_up,
  input  logic        lc_down,
  input  logic        lc_ok,
  // pedestal memory write port (CPU)
  input  logic        ped_we_a,
  input  logic        ped_we_b,
  input  logic [8:0]  ped_waddr,
  input  logic [9:0]  ped_wdata,
  // sample stream from the digitizer front end
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        s_atwd,        // 0 = ATWD A, 1 = ATWD B
  input  logic [9:0]  s_data,
  // LBM write port (PLD-to-stripe bridge)
  output logic        m_valid,
  input  logic        m_ready,
  output logic [31:0] m_addr,
  output logic [31:0] m_wdata,
  // status
  output logic [31:0] lbm_ptr,
  output logic        busy_a,
  output logic        busy_b,
  output logic        xfer,          // transferring event data
  output logic        ev_kept,       // one-clock pulses per event
  output logic        ev_dropped
);
  typedef enum logic [2:0] {S_IDLE, S_SAMP, S_LC, S_HDR, S_DONE} state_e;
  state_e state;

  // ------------------------------------------------ per-ATWD descriptors
  logic [47:0] d_ts   [2];
  logic [15:0] d_trig [2];
  logic [1:0]  d_cal, d_lc_have, d_lc_up, d_lc_dn, d_lc_ok, d_dt_run;
  logic [15:0] d_dead [2];
  logic        last_b;                // ATWD of the latest launch

  // ------------------------------------------------------- current event
  logic        cur;
  logic [9:0]  n;                     // sample number 0..767
  logic [9:0]  lo;                    // even sample waiting for its pair
  logic [3:0]  ovf, on;
  logic [31:0] base;
  logic [1:0]  hw;                    // header word index
  logic        rst_pend;
  logic        hdr_only;

  daq_mode_e   dmode;
  lc_mode_e    lmode;
  logic        want_fadc, want_atwd, all_ch, need_lc, full;
  logic [31:0] ptr_eff;

  assign dmode     = daq_mode_e'(daq.daq_mode);
  assign lmode     = lc_mode_e'(daq.lc_mode);
  assign want_fadc = (dmode == DAQ_ATWD_FADC) || (dmode == DAQ_FADC_ONLY);
  assign want_atwd = (dmode == DAQ_ATWD_FADC);
  assign all_ch    = (daq.atwd_mode == ATWD_TEST) || (daq.atwd_mode == ATWD_DEBUG);
  assign need_lc   = (lmode != LC_OFF) && (dmode != DAQ_TS_ONLY) &&
                     !(d_cal[cur] && !daq.lc_hb_dis);
  assign ptr_eff   = rst_pend ? 32'd0 : lbm_ptr;
  assign full      = (daq.lbm_mode == LBM_STOP) && (ptr_eff >= LBM_SIZE);

  // sample decode
  logic        is_fadc;
  logic [8:0]  k;
  logic [1:0]  ch;
  logic [6:0]  j;
  logic [9:0]  sub_a, sub_b, sub;
  logic        ch_want, wr_smp;
  assign is_fadc = (n < 10'd256);
  assign k       = 9'(n - 10'd256);
  assign ch      = k[8:7];
  assign j       = k[6:0];
  assign sub     = cur ? sub_b : sub_a;

  always_comb begin
    if (ch == 2'd0)     ch_want = want_atwd;
    else if (all_ch)    ch_want = want_atwd;
    else if (ch == 2'd3) ch_want = 1'b0;
    else                ch_want = on[ch-1] && ovf[ch-1];
  end
  assign wr_smp = is_fadc ? want_fadc : ((j == 0) ? ch_want : on[ch]);

  pedestal_sub u_ped_a (
    .clk, .we(ped_we_a), .waddr(ped_waddr), .wdata(ped_wdata),
    .idx(k), .raw(s_data), .sub(sub_a));
  pedestal_sub u_ped_b (
    .clk, .we(ped_we_b), .waddr(ped_waddr), .wdata(ped_wdata),
    .idx(k), .raw(s_data), .sub(sub_b));

  assign s_ready = (state == S_SAMP) && !m_valid && (s_atwd == cur);
  assign xfer    = (state == S_SAMP) || (state == S_HDR);
  logic a_busy_q, b_busy_q;
  assign busy_a  = a_busy_q;
  assign busy_b  = b_busy_q;

  logic accept;
  assign accept = s_valid && s_ready;

  logic [1:0] size;
  always_comb
    if (on[3])      size = 2'd3;
    else if (on[2]) size = 2'd2;
    else if (on[1]) size = 2'd1;
    else            size = 2'd0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= S_IDLE;
      for (int i = 0; i < 2; i++) begin
        d_ts[i]   <= '0;
        d_trig[i] <= '0;
        d_dead[i] <= '0;
      end
      d_cal      <= '0;
      d_lc_have  <= '0;
      d_lc_up    <= '0;
      d_lc_dn    <= '0;
      d_lc_ok    <= '0;
      d_dt_run   <= '0;
      a_busy_q   <= 1'b0;
      b_busy_q   <= 1'b0;
      last_b     <= 1'b0;
      cur        <= 1'b0;
      n          <= '0;
      lo         <= '0;
      ovf        <= '0;
      on         <= '0;
      base       <= '0;
      hw         <= '0;
      rst_pend   <= 1'b0;
      hdr_only   <= 1'b0;
      lbm_ptr    <= '0;
      m_valid    <= 1'b0;
      m_addr     <= '0;
      m_wdata    <= '0;
      ev_kept    <= 1'b0;
      ev_dropped <= 1'b0;
    end else begin
      ev_kept    <= 1'b0;
      ev_dropped <= 1'b0;
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (lbm_rst) rst_pend <= 1'b1;

      // dead-time counters
      for (int i = 0; i < 2; i++)
        if (d_dt_run[i] && d_dead[i] != 16'hFFFF) d_dead[i] <= d_dead[i] + 1'b1;

      // launches
      if (launch_a || launch_b) begin
        d_ts[launch_b]      <= systime;
        d_trig[launch_b]    <= ev_trig;
        d_cal[launch_b]     <= ev_is_cal;
        d_lc_have[launch_b] <= 1'b0;
        d_dead[launch_b]    <= '0;
        d_dt_run[launch_b]  <= 1'b1;
        last_b              <= launch_b;
        if (launch_b) b_busy_q <= 1'b1; else a_busy_q <= 1'b1;
      end
      if (lc_done) begin
        d_lc_have[last_b] <= 1'b1;
        d_lc_up[last_b]   <= lc_up;
        d_lc_dn[last_b]   <= lc_down;
        d_lc_ok[last_b]   <= lc_ok;
      end

      unique case (state)
        S_IDLE:
          if (s_valid && !full) begin
            cur      <= s_atwd;
            n        <= '0;
            ovf      <= '0;
            on       <= '0;
            hdr_only <= 1'b0;
            base     <= LBM_BASE + (ptr_eff & 32'(LBM_SIZE - 1));
            if (rst_pend) begin
              lbm_ptr  <= '0;
              rst_pend <= lbm_rst;
            end
            state <= S_SAMP;
          end
        S_SAMP:
          if (accept) begin
            if (n == 10'd0) d_dt_run[cur] <= 1'b0;
            n <= n + 1'b1;
            if (!is_fadc) begin
              if (s_data >= OVF_LEVEL) ovf[ch] <= 1'b1;
              if (j == 0) on[ch] <= ch_want;
            end
            if (n[0] == 1'b0)
              lo <= is_fadc ? s_data : sub;
            else if (wr_smp) begin
              m_valid <= 1'b1;
              m_wdata <= {6'd0, is_fadc ? s_data : sub, 6'd0, lo};
              m_addr  <= is_fadc ? base + 32'(OFS_FADC) + 32'({n[7:1], 2'b00})
                                 : base + 32'(OFS_ATWD) + 32'({ch, 8'h00})
                                        + 32'({j[6:1], 2'b00});
            end
            if (n == 10'd767) state <= S_LC;
          end
        S_LC:
          if (!need_lc || d_lc_have[cur]) begin
            hw <= '0;
            if (need_lc && !d_lc_ok[cur] && lmode == LC_HARD) begin
              ev_dropped <= 1'b1;
              state      <= S_DONE;
            end else begin
              hdr_only <= need_lc && !d_lc_ok[cur];
              state    <= S_HDR;
            end
          end
        S_HDR:
          if (!m_valid) begin
            m_valid <= 1'b1;
            m_addr  <= base + 32'({hw, 2'b00});
            unique case (hw)
              2'd0: m_wdata <= {HDR_CONST, d_ts[cur][15:0]};
              2'd1: m_wdata <= d_ts[cur][47:16];
              2'd2: m_wdata <= {6'd0, d_lc_up[cur], d_lc_dn[cur], 3'd0,
                                (want_atwd && !hdr_only) ? size : 2'd0,
                                want_atwd && !hdr_only,
                                want_fadc && !hdr_only,
                                cur, d_trig[cur]};
              default: m_wdata <= {16'd0, d_dead[cur]};
            endcase
            hw <= hw + 1'b1;
            if (hw == 2'd3) begin
              lbm_ptr <= lbm_ptr + 32'(LBM_EVENT_BYTES);
              ev_kept <= 1'b1;
              state   <= S_DONE;
            end
          end
        S_DONE:
          if (!m_valid) begin
            if (cur) b_busy_q <= 1'b0; else a_busy_q <= 1'b0;
            state <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end

  a_rule: assert property (@(posedge clk) disable iff (!rst_n) !(m_valid && m_addr < LBM_BASE))
    else $error("event_builder: write below the LBM region");
  // a write request is held, unchanged, until the bridge takes it
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      m_valid && !m_ready |=> m_valid && $stable(m_addr) && $stable(m_wdata))
    else $error("event_builder: write request changed before it was taken");
endmodule
