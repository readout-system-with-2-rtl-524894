// hmcad1511_model: behavioural model (not synthesizable) of the serial LVDS
// output of an HMCAD1511 8-bit ADC, for testbenches only.
//
// It drives the bit clock lclk (2 ns period, 500 MHz), eight data lanes at
// 1 Gb/s (DDR) and the frame clock fclk (8 ns period). Data changes half-way
// between lclk edges, so both edges sample the middle of a bit. Every frame of
// eight bit times each lane sends one sample, D0 first (D0 = LSB). Dual-channel
// mode: lanes 0..3 (1A,1B,2A,2B) carry samples 4f..4f+3 of channel 0 and
// lanes 4..7 the same samples of channel 1. Single-channel mode: lane l
// carries sample 8f+l of channel 0. fclk is high for D0..D3 and low for D4..D7.
// The sample values are taken from the array wave, which the testbench fills
// (index wraps at NS) before time 0.5 ns. SKEW_BITS idle bits are sent first so the receiver has
// to find the frame boundary.
module hmcad1511_model #(
  parameter int NS        = 4096,
  parameter int SKEW_BITS = 3
) (
  input  logic       single_mode,
  output logic       lclk,
  output logic [7:0] lane,
  output logic       fclk
);
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] wave [2][NS];
  int         frame_no;   // frame now being sent

  initial begin
    lclk = 1'b0;
    forever #1 lclk = ~lclk;
  end

  initial begin
    int gbit;
    int b;
    lane = '0; fclk = 1'b0; frame_no = 0;
    #0.5;
    repeat (SKEW_BITS) begin
      lane = 8'h55; fclk = 1'b0;
      #1;
    end
    gbit = 0;
    forever begin
      logic [7:0] s;
      frame_no = gbit / 8;
      b = gbit % 8;
      for (int l = 0; l < 8; l++) begin
        if (single_mode) s = wave[0][(8*frame_no + l) % NS];
        else             s = wave[l/4][(4*frame_no + l%4) % NS];
        lane[l] = s[b];
      end
      fclk = (b < 4);
      gbit++;
      #1;
    end
  end
endmodule
