// fadc_pkg: types and constants shared by the two-channel 8-bit FADC readout.
//
// The ADC (HMCAD1511) delivers its samples on eight serial LVDS lanes. Every
// frame-clock period each lane carries one 8-bit sample, so one frame is eight
// samples, 64 bits, which is also the width of the AXI data path to the
// processor. In dual-channel mode lanes 1A,1B,2A,2B hold four consecutive
// samples of channel 1 and lanes 3A,3B,4A,4B four of channel 2; in
// single-channel (test) mode all eight lanes hold consecutive samples of one
// input. The lane-to-sample order follows the ADC's dual-channel output
// timing; the single-channel order and all register encodings are choices of
// this design.
package fadc_pkg;

  localparam int unsigned SAMPLE_W    = 8;   // ADC resolution
  localparam int unsigned N_LANES     = 8;   // data lanes 1A..4B
  localparam int unsigned FRAME_W     = SAMPLE_W * N_LANES;  // 64
  localparam int unsigned TS_W        = 32;  // frame time-stamp width

  // One frame: byte i is the sample carried by lane i (0=1A,1=1B,...,7=4B).
  typedef logic [N_LANES-1:0][SAMPLE_W-1:0] frame_t;

  // Trigger source / decision rule.
  typedef enum logic [1:0] {
    TRIG_COINC  = 2'd0,  // both PMTs fire within the window
    TRIG_ANTI   = 2'd1,  // one PMT fires and the other stays quiet for the window
    TRIG_SINGLE = 2'd2,  // single-channel test mode: any crossing of input 1
    TRIG_EXT    = 2'd3   // external trigger input
  } trig_mode_e;

  // Run-time configuration, written through the register block.
  typedef struct packed {
    logic                enable;      // accept triggers / build events
    logic                single_mode; // ADC runs one channel at 1 GS/s
    trig_mode_e          mode;
    logic [1:0]          neg_pol;     // per channel: 1 = pulses go below threshold
    logic [1:0][7:0]     thresh;      // per channel threshold (offset binary code)
    logic [7:0]          window;      // coincidence window, frames
    logic [7:0]          pre;         // frames recorded before the trigger frame
    logic [7:0]          post;        // frames recorded from the trigger frame on
  } cfg_t;

  // Trigger flags carried into the event header.
  typedef struct packed {
    logic [3:0]  rsvd;
    trig_mode_e  mode;
    logic [1:0]  hit;     // which channels crossed threshold
  } trig_flags_t;

  localparam logic [15:0] EVT_MAGIC = 16'hFADC;

endpackage
