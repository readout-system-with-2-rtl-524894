// trigger_logic: real-time trigger for the two PMTs at the ends of the
// scintillator cell, working on the stream of 8-sample ADC frames.
//
// Discrimination: a channel is "over" in a frame when any of its samples
// crosses that channel's threshold (below it for negative pulses, above it
// otherwise; samples are offset-binary codes). A hit is the first frame of an
// over period, so a long pulse gives one hit. In dual-channel mode bytes 0-3
// of a frame belong to channel 1 and bytes 4-7 to channel 2; in single-channel
// mode all eight bytes are channel 1 and channel 2 never hits.
//
// Decision, chosen by cfg.mode:
//   TRIG_COINC  - both channels hit within cfg.window frames of each other;
//                 the trigger carries the frame of the first hit.
//   TRIG_ANTI   - one channel hits and the other does not hit within
//                 cfg.window frames; decided when the window closes.
//   TRIG_SINGLE - every channel-1 hit (test mode, one PMT sampled).
//   TRIG_EXT    - rising edge of the external trigger input.
// Every frame is numbered by a counter of valid frames (frame_ts); the
// trigger's trig_ts is the number of the frame the event belongs to, so the
// event buffer can pick its samples around it whatever the decision delay.
//
// Timing: trig_valid is a one-cycle pulse two cycles after the frame that
// completes the decision (one cycle for ext_trig after its two-flop
// synchroniser). A pending single hit is held for at most cfg.window frames.
// The original system description names the trigger and anticoincidence logic and what it is
// for; the discriminator, the window rule and the modes are this design's.
module trigger_logic
  import fadc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  cfg_t            cfg,
  input  frame_t          frame,
  input  logic            frame_valid,
  input  logic            ext_trig,
  output logic            trig_valid,
  output logic [TS_W-1:0] trig_ts,
  output trig_flags_t     trig_flags
);
  // ---------------- stage 1: discriminator ----------------
  logic [1:0]      over, over_prev, hit_q;
  logic [TS_W-1:0] frame_cnt, ts_q;
  logic            valid_q;

  function automatic logic crosses(input logic [7:0] s, input logic [7:0] thr, input logic neg);
    return neg ? (s < thr) : (s > thr);
  endfunction

  always_comb begin
    over = '0;
    for (int i = 0; i < N_LANES; i++) begin
      if (cfg.single_mode || i < N_LANES/2) begin
        if (crosses(frame[i], cfg.thresh[0], cfg.neg_pol[0])) over[0] = 1'b1;
      end else begin
        if (crosses(frame[i], cfg.thresh[1], cfg.neg_pol[1])) over[1] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      over_prev <= '0;
      hit_q     <= '0;
      frame_cnt <= '0;
      ts_q      <= '0;
      valid_q   <= 1'b0;
    end else begin
      valid_q <= frame_valid;
      if (frame_valid) begin
        over_prev <= over;
        hit_q     <= over & ~over_prev;
        ts_q      <= frame_cnt;
        frame_cnt <= frame_cnt + 1'b1;
      end
    end
  end

  // external trigger: synchronise and detect the rising edge
  logic [2:0] ext_s;
  always_ff @(posedge clk) begin
    if (rst) ext_s <= '0;
    else     ext_s <= {ext_s[1:0], ext_trig};
  end

  // ---------------- stage 2: coincidence / anticoincidence ----------------
  logic            pend;
  logic [1:0]      pend_ch;
  logic [TS_W-1:0] pend_ts;
  logic [TS_W-1:0] age;
  logic            expired, partner;
  assign age    = ts_q - pend_ts;
  assign expired = pend && (age > TS_W'(cfg.window));
  assign partner = pend && !expired && ((hit_q & ~pend_ch) != 2'b00);

  always_ff @(posedge clk) begin
    if (rst) begin
      pend       <= 1'b0;
      pend_ch    <= '0;
      pend_ts    <= '0;
      trig_valid <= 1'b0;
      trig_ts    <= '0;
      trig_flags <= '0;
    end else begin
      trig_valid <= 1'b0;
      if (!cfg.enable) begin
        pend <= 1'b0;
      end else if (cfg.mode == TRIG_EXT) begin
        pend <= 1'b0;
        if (ext_s[1] && !ext_s[2]) begin
          trig_valid <= 1'b1;
          trig_ts    <= frame_cnt;
          trig_flags <= '{rsvd: '0, mode: TRIG_EXT, hit: 2'b00};
        end
      end else if (cfg.mode == TRIG_SINGLE) begin
        pend <= 1'b0;
        if (valid_q && hit_q[0]) begin
          trig_valid <= 1'b1;
          trig_ts    <= ts_q;
          trig_flags <= '{rsvd: '0, mode: TRIG_SINGLE, hit: 2'b01};
        end
      end else if (valid_q) begin
        // a window that has run out
        if (expired) begin
          pend <= 1'b0;
          if (cfg.mode == TRIG_ANTI) begin
            trig_valid <= 1'b1;
            trig_ts    <= pend_ts;
            trig_flags <= '{rsvd: '0, mode: TRIG_ANTI, hit: pend_ch};
          end
        end
        if (partner) begin
          pend <= 1'b0;                     // coincidence found (ANTI: vetoed)
          if (cfg.mode == TRIG_COINC) begin
            trig_valid <= 1'b1;
            trig_ts    <= pend_ts;
            trig_flags <= '{rsvd: '0, mode: TRIG_COINC, hit: 2'b11};
          end
        end else if (!pend || expired) begin
          if (hit_q == 2'b11) begin
            if (cfg.mode == TRIG_COINC) begin
              trig_valid <= 1'b1;
              trig_ts    <= ts_q;
              trig_flags <= '{rsvd: '0, mode: TRIG_COINC, hit: 2'b11};
            end
          end else if (hit_q != 2'b00) begin
            pend    <= 1'b1;
            pend_ch <= hit_q;
            pend_ts <= ts_q;
          end
        end
      end
    end
  end
endmodule
