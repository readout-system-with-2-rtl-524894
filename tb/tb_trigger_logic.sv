// tb_trigger_logic: directed, self-checking test of the trigger. Frames of
// baseline samples (0x80) are sent with single-frame pulses placed on chosen
// channels and frames; the expected triggers (frame number, hit flags) are
// written down by hand from the rules of each mode and compared, in order and
// in number, with what the block emits. Covers coincidence inside and outside
// the window, a long pulse, anticoincidence with and without veto, single-
// channel mode (pulse on a lane that would be channel 2 in dual mode),
// positive polarity, the external trigger, disabled operation and the
// decision latency.
module tb_trigger_logic;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #3 clk = ~clk;

  cfg_t cfg;
  frame_t frame;
  logic frame_valid = 1'b0, ext_trig = 1'b0;
  logic trig_valid;
  logic [TS_W-1:0] trig_ts;
  trig_flags_t trig_flags;
  int checks = 0, failures = 0;

  trigger_logic dut (.clk(clk), .rst(rst), .cfg(cfg), .frame(frame), .frame_valid(frame_valid),
                     .ext_trig(ext_trig), .trig_valid(trig_valid), .trig_ts(trig_ts),
                     .trig_flags(trig_flags));

  // captured triggers
  logic [TS_W-1:0] got_ts [$];
  logic [1:0]      got_hit [$];
  trig_mode_e      got_mode [$];
  int              got_cycle [$];
  int cycle = 0;
  int fcycles [$];   // cycle at which each frame since reset was taken
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (frame_valid && !rst) fcycles.push_back(cycle);
    if (trig_valid) begin
      got_ts.push_back(trig_ts);
      got_hit.push_back(trig_flags.hit);
      got_mode.push_back(trig_flags.mode);
      got_cycle.push_back(cycle);
    end
  end

  // pulses: list of (frame, channel, level) for the current run
  int p_frame [$], p_ch [$];
  logic [7:0] p_val [$];

  task automatic run_frames(input int n);
    for (int f = 0; f < n; f++) begin
      frame_t fr;
      for (int i = 0; i < 8; i++) fr[i] = 8'h80;
      foreach (p_frame[k]) if (p_frame[k] == f) begin
        if (p_ch[k] == 0) fr[1] = p_val[k];
        else if (p_ch[k] == 1) fr[6] = p_val[k];
        else fr[5] = p_val[k];              // lane 5 (channel 2 lane in dual mode)
      end
      @(negedge clk); frame = fr; frame_valid = 1'b1;
      @(negedge clk); frame_valid = 1'b0;   // one frame every other cycle
    end
    repeat (6) @(negedge clk);
  endtask

  task automatic pulse(input int f, input int ch, input logic [7:0] v);
    p_frame.push_back(f); p_ch.push_back(ch); p_val.push_back(v);
  endtask

  task automatic restart(input trig_mode_e m, input logic single);
    @(negedge clk); rst = 1'b1;
    cfg.mode = m; cfg.single_mode = single;
    p_frame.delete(); p_ch.delete(); p_val.delete();
    got_ts.delete(); got_hit.delete(); got_mode.delete(); got_cycle.delete(); fcycles.delete();
    repeat (2) @(negedge clk); rst = 1'b0;
  endtask

  task automatic expect_trigs(input string name, input int exp_ts [], input logic [1:0] exp_hit [],
                              input trig_mode_e m);
    checks++;
    if (got_ts.size() != exp_ts.size()) begin
      failures++;
      $display("%s: %0d triggers, expected %0d", name, got_ts.size(), exp_ts.size());
      foreach (got_ts[i]) $display("   got ts=%0d hit=%b", got_ts[i], got_hit[i]);
    end else begin
      foreach (exp_ts[i]) begin
        checks++;
        if (got_ts[i] != TS_W'(exp_ts[i]) || got_hit[i] != exp_hit[i] || got_mode[i] != m) begin
          failures++;
          $display("%s: trigger %0d ts=%0d hit=%b mode=%0d, expected ts=%0d hit=%b",
                   name, i, got_ts[i], got_hit[i], got_mode[i], exp_ts[i], exp_hit[i]);
        end
      end
    end
  endtask

  initial begin
    cfg = '0;
    cfg.enable  = 1'b1;
    cfg.neg_pol = 2'b11;
    cfg.thresh  = {8'h70, 8'h70};
    cfg.window  = 8'd4;
    frame = '0;

    // ---- coincidence ----
    restart(TRIG_COINC, 1'b0);
    pulse(10, 0, 8'h40); pulse(12, 1, 8'h40);            // inside window -> ts 10
    pulse(20, 0, 8'h40);                                 // alone -> none
    pulse(30, 0, 8'h40); pulse(30, 1, 8'h40);            // same frame -> ts 30
    pulse(40, 0, 8'h40); pulse(45, 1, 8'h40);            // 5 frames apart -> none
    for (int f = 60; f < 66; f++) pulse(f, 0, 8'h30);    // long pulse, one hit at 60
    pulse(63, 1, 8'h30);                                 // -> ts 60
    pulse(70, 1, 8'h71);                                 // at threshold, not below -> none
    pulse(71, 0, 8'h6F);
    pulse(80, 0, 8'h40); pulse(84, 1, 8'h40);            // exactly the window -> ts 80
    run_frames(100);
    expect_trigs("coinc", '{10, 30, 60, 80}, '{2'b11, 2'b11, 2'b11, 2'b11}, TRIG_COINC);
    // latency: the trigger follows the frame that completes it (12) by 2 cycles
    checks++;
    if (got_cycle.size() == 0 || got_cycle[0] - fcycles[12] != 2) begin
      failures++;
      $display("coinc latency %0d cycles", got_cycle.size() ? got_cycle[0] - fcycles[12] : -1);
    end

    // ---- coincidence, positive pulses on channel 2 ----
    cfg.neg_pol = 2'b01; cfg.thresh[1] = 8'h90;
    restart(TRIG_COINC, 1'b0);
    pulse(5, 0, 8'h40); pulse(7, 1, 8'hC0);              // -> ts 5
    pulse(20, 0, 8'h40); pulse(21, 1, 8'h40);            // low pulse on positive channel -> none
    run_frames(40);
    expect_trigs("coinc+pos", '{5}, '{2'b11}, TRIG_COINC);
    cfg.neg_pol = 2'b11; cfg.thresh[1] = 8'h70;

    // ---- anticoincidence ----
    restart(TRIG_ANTI, 1'b0);
    pulse(10, 0, 8'h40);                                 // alone -> ts 10, ch0
    pulse(20, 0, 8'h40); pulse(22, 1, 8'h40);            // vetoed
    pulse(30, 1, 8'h40);                                 // alone -> ts 30, ch1
    pulse(40, 0, 8'h40); pulse(40, 1, 8'h40);            // vetoed
    pulse(50, 1, 8'h40); pulse(55, 0, 8'h40);            // 5 apart: both alone -> 50, 55
    run_frames(80);
    expect_trigs("anti", '{10, 30, 50, 55}, '{2'b01, 2'b10, 2'b10, 2'b01}, TRIG_ANTI);

    // ---- single-channel test mode ----
    restart(TRIG_SINGLE, 1'b1);
    pulse(10, 2, 8'h40);   // lane 5 belongs to input 1 in single mode
    pulse(20, 0, 8'h40);
    run_frames(30);
    expect_trigs("single", '{10, 20}, '{2'b01, 2'b01}, TRIG_SINGLE);

    // the same lane-5 pulse in dual mode is channel 2 and does not trigger single mode
    restart(TRIG_SINGLE, 1'b0);
    pulse(10, 2, 8'h40);
    run_frames(20);
    expect_trigs("single/dual", '{}, '{}, TRIG_SINGLE);

    // ---- external trigger ----
    restart(TRIG_EXT, 1'b0);
    fork
      run_frames(40);
      begin
        repeat (41) @(negedge clk);   // after about 20 frames
        ext_trig = 1'b1;
        repeat (10) @(negedge clk);
        ext_trig = 1'b0;
      end
    join
    checks++;
    if (got_ts.size() != 1) begin failures++; $display("ext: %0d triggers", got_ts.size()); end
    else if (got_ts[0] < 19 || got_ts[0] > 24) begin
      failures++; $display("ext: ts %0d", got_ts[0]);
    end

    // ---- disabled ----
    cfg.enable = 1'b0;
    restart(TRIG_COINC, 1'b0);
    pulse(10, 0, 8'h40); pulse(10, 1, 8'h40);
    run_frames(20);
    expect_trigs("disabled", '{}, '{}, TRIG_COINC);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
