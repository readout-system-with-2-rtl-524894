// hmcad_rx: receiver for the HMCAD1511 serial LVDS outputs.
//
// The ADC sends each sample bit-serially on eight data lanes (1A,1B,...,4B)
// together with a DDR bit clock LCLK and a frame clock FCLK. With the ADC in
// dual-channel mode at 500 MS/s, LCLK runs at 500 MHz and carries two bits per
// period (one on each edge), so every lane moves 1 Gb/s and delivers one
// 8-bit sample per FCLK period (125 MHz, one quarter of the input clock).
// Lanes 1A,1B,2A,2B carry samples N-4,N-3,N-2,N-1 of the first input and
// lanes 3A..4B the same for the second, bits D0 first.
//
// How it works: every line (eight lanes plus FCLK) is captured on both LCLK
// edges and shifted, two bits per LCLK cycle, into a 16-bit history. Every
// fourth LCLK cycle an 8-bit window is cut from each history at a common bit
// offset (the bit slip). The FCLK window is compared with FCLK_PATTERN; on a
// mismatch the slip moves by one bit, and after LOCK_FRAMES matching frames in
// a row the receiver declares itself aligned. Aligned frames (64 bits) go
// through a Gray-pointer dual-clock FIFO into the system clock domain.
//
// Interface: lane_in/fclk_in are the single-ended outputs of the LVDS input
// buffers, sampled on lclk. frame/frame_valid come out on clk, one frame per
// valid cycle; byte i of frame is lane i. aligned and ovf (a frame was lost
// because the FIFO was full, sticky until reset) are synchronised to clk. clk
// must be faster than the frame rate (125 MHz with the ADC at 2 x 500 MS/s).
//
// From the ADC's timing: lane-to-sample order, DDR bit rate, 8 bits per lane
// per frame, FCLK = LCLK/4. This design's choices: D0 is the sample's least
// significant bit, the FCLK window expected at the frame boundary (four ones
// then four zeros, first bit in bit 0), the lock count and the FIFO depth.
module hmcad_rx
  import fadc_pkg::*;
#(
  parameter logic [7:0]  FCLK_PATTERN = 8'h0F,
  parameter int unsigned LOCK_FRAMES  = 4,
  parameter int unsigned FIFO_AW      = 3
) (
  input  logic               lclk,
  input  logic [N_LANES-1:0] lane_in,
  input  logic               fclk_in,
  input  logic               clk,
  input  logic               rst,
  output frame_t             frame,
  output logic               frame_valid,
  output logic               aligned,
  output logic               ovf
);
  localparam int unsigned NL = N_LANES + 1;  // data lanes + frame clock (index 8)

  // reset synchroniser into the bit-clock domain
  logic [1:0] lrst_sr;
  logic       lrst;
  always_ff @(posedge lclk or posedge rst) begin
    if (rst) lrst_sr <= 2'b11;
    else     lrst_sr <= {lrst_sr[0], 1'b0};
  end
  assign lrst = lrst_sr[1];

  // DDR capture: rising-edge bit is the earlier one of each LCLK period
  logic [NL-1:0] din, q_rise, q_fall;
  assign din = {fclk_in, lane_in};
  always_ff @(posedge lclk) q_rise <= din;
  always_ff @(negedge lclk) q_fall <= din;

  logic [NL-1:0][15:0] hist;
  logic [1:0]          phase;
  logic [2:0]          slip;
  logic [$clog2(LOCK_FRAMES+1)-1:0] lock_cnt;
  logic                locked;
  logic [NL-1:0][7:0]  win;
  logic                push;
  frame_t              frame_l;

  always_comb begin
    for (int l = 0; l < NL; l++) win[l] = hist[l][{1'b0, slip} +: 8];
  end

  always_ff @(posedge lclk) begin
    for (int l = 0; l < NL; l++) hist[l] <= {q_fall[l], q_rise[l], hist[l][15:2]};
  end

  always_ff @(posedge lclk) begin
    if (lrst) begin
      phase    <= '0;
      slip     <= '0;
      lock_cnt <= '0;
      locked   <= 1'b0;
      push     <= 1'b0;
      frame_l  <= '0;
    end else begin
      phase <= phase + 2'd1;
      push  <= 1'b0;
      if (phase == 2'd3) begin
        if (win[N_LANES] == FCLK_PATTERN) begin
          if (lock_cnt == LOCK_FRAMES[$bits(lock_cnt)-1:0]) locked <= 1'b1;
          else lock_cnt <= lock_cnt + 1'b1;
          for (int l = 0; l < N_LANES; l++) frame_l[l] <= win[l];
          push <= locked || (lock_cnt == LOCK_FRAMES[$bits(lock_cnt)-1:0]);
        end else begin
          slip     <= slip + 3'd1;
          lock_cnt <= '0;
          locked   <= 1'b0;
        end
      end
    end
  end

  logic full, empty, ovf_l;
  always_ff @(posedge lclk) begin
    if (lrst)             ovf_l <= 1'b0;
    else if (push && full) ovf_l <= 1'b1;
  end

  async_fifo #(.W(FRAME_W), .AW(FIFO_AW)) u_cdc (
    .wclk(lclk), .wrst(lrst), .wr_en(push), .wr_data(frame_l), .full(full),
    .rclk(clk), .rrst(rst), .rd_en(!empty), .rd_data(frame), .empty(empty)
  );
  assign frame_valid = !empty;

  // status into the system clock domain
  logic [1:0] al_s, ov_s;
  always_ff @(posedge clk) begin
    if (rst) begin
      al_s <= '0; ov_s <= '0;
    end else begin
      al_s <= {al_s[0], locked};
      ov_s <= {ov_s[0], ovf_l};
    end
  end
  assign aligned = al_s[1];
  assign ovf     = ov_s[1];
endmodule
