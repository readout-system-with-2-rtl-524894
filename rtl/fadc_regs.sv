// fadc_regs: AXI4-Lite control and status registers of the FADC readout, as
// seen by the software on the ARM cores over a general-purpose AXI port.
//
// Map (32-bit registers, byte addresses):
//   0x00 CTRL      rw [0] enable, [1] single-channel mode, [3:2] trigger mode
//                     (0 coinc, 1 anticoinc, 2 single, 3 external),
//                     [5:4] negative-pulse polarity for channel 1/2
//   0x04 THRESH    rw [7:0] channel-1 threshold, [15:8] channel-2 threshold
//   0x08 WINDOW    rw [7:0] coincidence window in frames (8 ns each)
//   0x0C EVTWIN    rw [7:0] pre-trigger frames, [15:8] post-trigger frames
//   0x10 RD_PTR    rw event-memory read pointer, in 64-bit words, with wrap bit
//   0x14 WR_PTR    ro committed write pointer (end of the last whole event)
//   0x18 EVT_CNT   ro events built
//   0x1C DROP_BUSY ro triggers lost while an event was being copied
//   0x20 DROP_FULL ro triggers lost because the event memory was full
//   0x24 SPI_CMD   w  [23:16] ADC register address, [15:0] value: starts a
//                     serial write to the ADC (ignored while one is running);
//                     reads back the last command
//   0x28 STATUS    ro [0] LVDS aligned, [1] LVDS FIFO overflow,
//                     [2] ADC serial write busy, [3] event copy busy,
//                     [4] events waiting (the irq line)
// irq is high while WR_PTR differs from RD_PTR: the software then starts a
// DMA transfer of the waiting events and advances RD_PTR.
//
// Protocol: a write is taken when AW and W are both valid (awready and
// wready rise together) and answered on B the next cycle; a read is answered
// on R the cycle after the AR handshake. Every response is OKAY.
// The register map and reset values are this design's; the original description gives
// no software interface.
module fadc_regs
  import fadc_pkg::*;
#(
  parameter int unsigned EVT_AW = 12
) (
  input  logic              clk,
  input  logic              rst,
  // AXI4-Lite slave
  input  logic [7:0]        s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [7:0]        s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // to the datapath
  output cfg_t              cfg,
  output logic [EVT_AW:0]   rd_ptr,
  output logic              spi_start,
  output logic [7:0]        spi_addr,
  output logic [15:0]       spi_data,
  output logic              irq,
  // from the datapath
  input  logic [EVT_AW:0]   wr_ptr,
  input  logic [31:0]       evt_count,
  input  logic [31:0]       drop_busy,
  input  logic [31:0]       drop_full,
  input  logic              rx_aligned,
  input  logic              rx_ovf,
  input  logic              spi_busy,
  input  logic              evt_busy
);
  localparam logic [7:0] A_CTRL = 8'h00, A_THRESH = 8'h04, A_WINDOW = 8'h08,
                         A_EVTWIN = 8'h0C, A_RDPTR = 8'h10, A_WRPTR = 8'h14,
                         A_EVTCNT = 8'h18, A_DBUSY = 8'h1C, A_DFULL = 8'h20,
                         A_SPI = 8'h24, A_STATUS = 8'h28;

  logic [31:0] ctrl_r, thresh_r, window_r, evtwin_r, spi_r;
  logic        wr_fire;
  logic [31:0] rdp_n;

  assign irq = (wr_ptr != rd_ptr);

  assign cfg.enable      = ctrl_r[0];
  assign cfg.single_mode = ctrl_r[1];
  assign cfg.mode        = trig_mode_e'(ctrl_r[3:2]);
  assign cfg.neg_pol     = ctrl_r[5:4];
  assign cfg.thresh[0]   = thresh_r[7:0];
  assign cfg.thresh[1]   = thresh_r[15:8];
  assign cfg.window      = window_r[7:0];
  assign cfg.pre         = evtwin_r[7:0];
  assign cfg.post        = evtwin_r[15:8];
  assign spi_addr        = spi_r[23:16];
  assign spi_data        = spi_r[15:0];

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // write channel
  assign rdp_n = merge(32'(rd_ptr), s_wdata, s_wstrb);
  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_fire   = s_awready;
  assign s_bresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_r    <= 32'h0000_0030;   // disabled, coincidence, negative pulses
      thresh_r  <= 32'h0000_7070;
      window_r  <= 32'd4;
      evtwin_r  <= 32'h0000_1808;   // 8 frames before, 24 from the trigger on
      spi_r     <= '0;
      rd_ptr    <= '0;
      spi_start <= 1'b0;
      s_bvalid  <= 1'b0;
    end else begin
      spi_start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_fire) begin
        s_bvalid <= 1'b1;
        unique case ({s_awaddr[7:2], 2'b00})
          A_CTRL:   ctrl_r   <= merge(ctrl_r, s_wdata, s_wstrb);
          A_THRESH: thresh_r <= merge(thresh_r, s_wdata, s_wstrb);
          A_WINDOW: window_r <= merge(window_r, s_wdata, s_wstrb);
          A_EVTWIN: evtwin_r <= merge(evtwin_r, s_wdata, s_wstrb);
          A_RDPTR:  rd_ptr   <= rdp_n[EVT_AW:0];
          A_SPI: if (!spi_busy) begin
            spi_r     <= merge(spi_r, s_wdata, s_wstrb);
            spi_start <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // read channel
  logic [31:0] rmux;
  always_comb begin
    unique case ({s_araddr[7:2], 2'b00})
      A_CTRL:   rmux = ctrl_r;
      A_THRESH: rmux = thresh_r;
      A_WINDOW: rmux = window_r;
      A_EVTWIN: rmux = evtwin_r;
      A_RDPTR:  rmux = 32'(rd_ptr);
      A_WRPTR:  rmux = 32'(wr_ptr);
      A_EVTCNT: rmux = evt_count;
      A_DBUSY:  rmux = drop_busy;
      A_DFULL:  rmux = drop_full;
      A_SPI:    rmux = spi_r;
      A_STATUS: rmux = {27'd0, irq, evt_busy, spi_busy, rx_ovf, rx_aligned};
      default:  rmux = 32'hDEAD_BEEF;
    endcase
  end

  assign s_arready = !s_rvalid;
  assign s_rresp   = 2'b00;
  always_ff @(posedge clk) begin
    if (rst) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        s_rvalid <= 1'b1;
        s_rdata  <= rmux;
      end
    end
  end
endmodule
