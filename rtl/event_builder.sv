// event_builder: keeps the recent ADC frames in a pre-trigger ring and, for
// each accepted trigger, copies a window of frames around the trigger frame
// into the event DPRAM, where the processor's DMA engine picks it up.
//
// How it works: every incoming frame is written into a ring of 2**RING_AW
// frames at the address given by its frame number. A trigger names its frame
// number T; the builder then writes a two-word header followed by frames
// T-cfg.pre .. T+cfg.post-1 into the event memory, one 64-bit word per
// cycle, waiting for frames that have not arrived yet. The event memory is a
// ring of 2**EVT_AW words shared with the reader: wr_ptr_commit advances
// only when a whole event is in the memory (one cycle after its last write), and software hands space back by
// moving rd_ptr (both pointers carry one extra wrap bit).
//
// Event format (64-bit words):
//   word 0: [63:48] 16'hFADC, [47:32] length in words incl. header, [31:0] event number
//   word 1: [63:32] trigger frame number, [31:24] pre, [23:16] post,
//           [15:8] trigger flags {rsvd, mode, hit}, [7:0] zero
//   words 2..: frames, byte i = lane i
//
// Dead time and overflow: a trigger that arrives while an event is being
// copied is dropped and counted in drop_busy; one for which the event memory
// has no room is dropped and counted in drop_full. Constraint: cfg.pre plus
// the trigger decision delay (cfg.window + a few frames) must stay below the
// ring size, or the oldest frames of an event have already been overwritten.
//
// The original system description says only that triggered data is buffered in a DPRAM and moved
// to DDR3 by DMA; the ring, the header and the pointer protocol are this
// design's.
module event_builder
  import fadc_pkg::*;
#(
  parameter int unsigned RING_AW = 8,
  parameter int unsigned EVT_AW  = 12
) (
  input  logic              clk,
  input  logic              rst,
  input  cfg_t              cfg,
  input  frame_t            frame,
  input  logic              frame_valid,
  input  logic              trig_valid,
  input  logic [TS_W-1:0]   trig_ts,
  input  trig_flags_t       trig_flags,
  input  logic [EVT_AW:0]   rd_ptr,
  output logic              evt_wr_en,
  output logic [EVT_AW-1:0] evt_wr_addr,
  output logic [63:0]       evt_wr_data,
  output logic [EVT_AW:0]   wr_ptr_commit,
  output logic [31:0]       evt_count,
  output logic [31:0]       drop_busy,
  output logic [31:0]       drop_full,
  output logic              busy
);
  typedef enum logic [2:0] {S_IDLE, S_HDR0, S_HDR1, S_COPY, S_DONE} state_e;
  state_e state;

  logic [TS_W-1:0] fcnt;       // number of the next frame to arrive
  logic [TS_W-1:0] src;        // next frame to read from the ring
  logic [8:0]      to_issue;   // ring reads still to issue
  logic [8:0]      to_write;   // frame words still to write
  logic [EVT_AW:0] wr;
  logic [15:0]     len_words;
  logic [63:0]     hdr1;
  logic            rd_issue, rd_valid_q;
  logic [63:0]     ring_q;

  // ring of recent frames
  sdp_ram #(.W(64), .AW(RING_AW)) u_ring (
    .clk(clk),
    .wr_en(frame_valid), .wr_addr(fcnt[RING_AW-1:0]), .wr_data(frame),
    .rd_en(rd_issue), .rd_addr(src[RING_AW-1:0]), .rd_data(ring_q)
  );

  logic [EVT_AW:0]   used;
  logic [EVT_AW+1:0] free_words, need_words;
  assign used       = wr_ptr_commit - rd_ptr;
  assign free_words = (EVT_AW+2)'(2**EVT_AW) - (EVT_AW+2)'(used);
  assign need_words = (EVT_AW+2)'(cfg.pre) + (EVT_AW+2)'(cfg.post) + (EVT_AW+2)'(2);

  // frame src has arrived when it lies before fcnt (modular compare)
  logic src_ready;
  assign src_ready = $signed(fcnt - src) > 0;
  assign rd_issue  = (state == S_COPY) && (to_issue != 0) && src_ready;
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      fcnt          <= '0;
      src           <= '0;
      to_issue      <= '0;
      to_write      <= '0;
      wr            <= '0;
      wr_ptr_commit <= '0;
      len_words     <= '0;
      hdr1          <= '0;
      rd_valid_q    <= 1'b0;
      evt_count     <= '0;
      drop_busy     <= '0;
      drop_full     <= '0;
      evt_wr_en     <= 1'b0;
      evt_wr_addr   <= '0;
      evt_wr_data   <= '0;
    end else begin
      if (frame_valid) fcnt <= fcnt + 1'b1;
      rd_valid_q <= rd_issue;
      evt_wr_en  <= 1'b0;

      if (trig_valid && state != S_IDLE) drop_busy <= drop_busy + 1'b1;

      unique case (state)
        S_IDLE: begin
          if (trig_valid) begin
            if (need_words > free_words) begin
              drop_full <= drop_full + 1'b1;
            end else begin
              state     <= S_HDR0;
              src       <= trig_ts - TS_W'(cfg.pre);
              to_issue  <= 9'(cfg.pre) + 9'(cfg.post);
              to_write  <= 9'(cfg.pre) + 9'(cfg.post);
              len_words <= 16'(need_words);
              hdr1      <= {trig_ts, cfg.pre, cfg.post, 8'(trig_flags), 8'h00};
            end
          end
        end
        S_HDR0: begin
          evt_wr_en   <= 1'b1;
          evt_wr_addr <= wr[EVT_AW-1:0];
          evt_wr_data <= {EVT_MAGIC, len_words, evt_count};
          wr          <= wr + 1'b1;
          state       <= S_HDR1;
        end
        S_HDR1: begin
          evt_wr_en   <= 1'b1;
          evt_wr_addr <= wr[EVT_AW-1:0];
          evt_wr_data <= hdr1;
          wr          <= wr + 1'b1;
          state       <= S_COPY;
        end
        S_COPY: begin
          if (rd_issue) begin
            src      <= src + 1'b1;
            to_issue <= to_issue - 1'b1;
          end
          if (rd_valid_q) begin
            evt_wr_en   <= 1'b1;
            evt_wr_addr <= wr[EVT_AW-1:0];
            evt_wr_data <= ring_q;
            wr          <= wr + 1'b1;
            to_write    <= to_write - 1'b1;
          end
          if (to_write == 0 || (to_write == 1 && rd_valid_q)) state <= S_DONE;
        end
        S_DONE: begin
          // the last word reached the memory at this edge: publish the event
          wr_ptr_commit <= wr;
          evt_count     <= evt_count + 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
