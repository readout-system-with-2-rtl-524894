// tb_hmcad_rx: self-checking test of the LVDS receiver against the ADC model.
// The model sends a ramp on channel 0 and a different affine sequence on
// channel 1, starting off the frame boundary. The test checks that the
// receiver locks, that every frame holds the right samples in the right byte
// lanes with no frame lost or repeated, that the frame rate is one per 8 ns,
// and the same in single-channel mode (eight consecutive samples per frame).
module tb_hmcad_rx;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  logic clk = 1'b0, rst = 1'b1, single_mode = 1'b0;
  logic lclk, fclk;
  logic [7:0] lane;
  frame_t frame;
  logic frame_valid, aligned, ovf;
  int checks = 0, failures = 0;

  always #3.25 clk = ~clk;   // ~154 MHz system clock

  hmcad1511_model #(.NS(4096), .SKEW_BITS(3)) u_adc (
    .single_mode(single_mode), .lclk(lclk), .lane(lane), .fclk(fclk));

  hmcad_rx dut (.lclk(lclk), .lane_in(lane), .fclk_in(fclk), .clk(clk), .rst(rst),
                .frame(frame), .frame_valid(frame_valid), .aligned(aligned), .ovf(ovf));

  function automatic logic [7:0] ch1(input int i);
    return 8'(i * 5 + 17);
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) begin
      u_adc.wave[0][i] = 8'(i);
      u_adc.wave[1][i] = ch1(i);
    end
  end

  // frame checker
  int   nframes = 0, bad = 0;
  logic have_prev = 1'b0;
  logic [7:0] prev_k;
  always @(posedge clk) begin
    if (!rst && frame_valid) begin
      logic [7:0] k;
      logic ok;
      k  = frame[0];
      ok = 1'b1;
      if (!single_mode) begin
        if (k[1:0] != 2'b00) ok = 1'b0;
        for (int i = 0; i < 4; i++) begin
          if (frame[i] != 8'(k + i)) ok = 1'b0;
          if (frame[4+i] != ch1(int'(k) + i)) ok = 1'b0;
        end
        if (have_prev && k != 8'(prev_k + 4)) ok = 1'b0;
      end else begin
        if (k[2:0] != 3'b000) ok = 1'b0;
        for (int i = 0; i < 8; i++) if (frame[i] != 8'(k + i)) ok = 1'b0;
        if (have_prev && k != 8'(prev_k + 8)) ok = 1'b0;
      end
      checks++;
      if (!ok) begin
        failures++;
        if (bad < 5) $display("frame mismatch: %h (prev k %h, single %0d)", frame, prev_k, single_mode);
        bad++;
      end
      prev_k    <= k;
      have_prev <= 1'b1;
      nframes++;
    end
  end

  initial begin
    int n0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    wait (aligned);
    checks++;
    if (ovf) begin failures++; $display("overflow flagged"); end
    // frame rate: 1000 frames in 8000 ns
    n0 = nframes;
    #8000;
    checks++;
    if (nframes - n0 < 998 || nframes - n0 > 1002) begin
      failures++; $display("frame rate: %0d frames in 8 us", nframes - n0);
    end
    // single-channel mode: restart the receiver
    rst = 1'b1; single_mode = 1'b1; have_prev = 1'b0;
    repeat (10) @(posedge clk);
    rst = 1'b0;
    wait (aligned);
    n0 = nframes;
    #4000;
    checks++;
    if (nframes - n0 < 498) begin failures++; $display("single mode: %0d frames", nframes - n0); end
    checks++;
    if (ovf) begin failures++; $display("overflow flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
