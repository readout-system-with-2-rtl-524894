// fadc_readout_top: programmable-logic side of a two-channel, 8-bit,
// 500 MS/s-per-channel (1 GS/s single-channel) waveform digitiser for a
// liquid-scintillator cell read out by a PMT at each end.
//
// Data flow: the HMCAD1511 ADC streams its samples on eight LVDS lanes plus a
// bit clock and a frame clock. hmcad_rx deserialises them into 64-bit frames
// (eight samples, 8 ns at 1 GS/s) and hands them to the system clock domain.
// trigger_logic discriminates each channel against a threshold and forms the
// coincidence / anticoincidence (or single-channel, or external) trigger.
// event_builder keeps a pre-trigger ring of frames and copies a window
// around every accepted trigger, with a header, into the event DPRAM. The
// ARM side reads the events out through evt_axi_slave, a 64-bit AXI4 read
// port meant for the processor system's central DMA engine, which moves them
// to DDR3; software is told by irq and frees the space by writing RD_PTR in
// fadc_regs. adc_spi_master writes the ADC's configuration registers (for
// example to switch it between dual- and single-channel mode).
//
// Clocks: lclk is the ADC's LVDS bit clock (500 MHz, DDR); clk is the
// AXI/system clock, which must run faster than the 125 MHz frame rate (the
// AXI link is specified up to 150 MHz). rst is synchronous to clk, active
// high. ext_trig is asynchronous.
//
// Outside this module: the ADC itself, its clock synthesiser (LMK04803B), the
// analog front end, the LVDS input buffers, the ARM cores with their DDR3
// controller, the DMA engine, Ethernet and the TCP/IP software.
module fadc_readout_top
  import fadc_pkg::*;
#(
  parameter int unsigned RING_AW = 8,
  parameter int unsigned EVT_AW  = 12,
  parameter int unsigned ID_W    = 4,
  parameter int unsigned SPI_DIV = 4
) (
  // ADC LVDS (after the input buffers)
  input  logic               lclk,
  input  logic [N_LANES-1:0] lane_in,
  input  logic               fclk_in,
  // system
  input  logic               clk,
  input  logic               rst,
  input  logic               ext_trig,
  output logic               irq,
  // ADC serial configuration port
  output logic               adc_csn,
  output logic               adc_sclk,
  output logic               adc_sdata,
  // AXI4-Lite register port
  input  logic [7:0]         s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [7:0]         s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // AXI4 read port on the event memory (64-bit)
  input  logic [ID_W-1:0]    s_axi_arid,
  input  logic [31:0]        s_axi_araddr,
  input  logic [7:0]         s_axi_arlen,
  input  logic [2:0]         s_axi_arsize,
  input  logic [1:0]         s_axi_arburst,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [ID_W-1:0]    s_axi_rid,
  output logic [63:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rlast,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready
);
  cfg_t              cfg;
  frame_t            frame;
  logic              frame_valid, rx_aligned, rx_ovf;
  logic              trig_valid;
  logic [TS_W-1:0]   trig_ts;
  trig_flags_t       trig_flags;
  logic              evt_wr_en, mem_rd_en;
  logic [EVT_AW-1:0] evt_wr_addr, mem_rd_addr;
  logic [63:0]       evt_wr_data, mem_rd_data;
  logic [EVT_AW:0]   wr_ptr, rd_ptr;
  logic [31:0]       evt_count, drop_busy, drop_full;
  logic              evt_busy, spi_start, spi_busy;
  logic [7:0]        spi_addr;
  logic [15:0]       spi_data;

  hmcad_rx u_rx (
    .lclk(lclk), .lane_in(lane_in), .fclk_in(fclk_in),
    .clk(clk), .rst(rst),
    .frame(frame), .frame_valid(frame_valid), .aligned(rx_aligned), .ovf(rx_ovf)
  );

  trigger_logic u_trig (
    .clk(clk), .rst(rst), .cfg(cfg), .frame(frame), .frame_valid(frame_valid),
    .ext_trig(ext_trig), .trig_valid(trig_valid), .trig_ts(trig_ts),
    .trig_flags(trig_flags)
  );

  event_builder #(.RING_AW(RING_AW), .EVT_AW(EVT_AW)) u_evb (
    .clk(clk), .rst(rst), .cfg(cfg), .frame(frame), .frame_valid(frame_valid),
    .trig_valid(trig_valid), .trig_ts(trig_ts), .trig_flags(trig_flags),
    .rd_ptr(rd_ptr),
    .evt_wr_en(evt_wr_en), .evt_wr_addr(evt_wr_addr), .evt_wr_data(evt_wr_data),
    .wr_ptr_commit(wr_ptr), .evt_count(evt_count),
    .drop_busy(drop_busy), .drop_full(drop_full), .busy(evt_busy)
  );

  // event DPRAM: written by the builder, read by the AXI port
  sdp_ram #(.W(64), .AW(EVT_AW)) u_evt_mem (
    .clk(clk),
    .wr_en(evt_wr_en), .wr_addr(evt_wr_addr), .wr_data(evt_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data)
  );

  evt_axi_slave #(.EVT_AW(EVT_AW), .ID_W(ID_W)) u_axi (
    .clk(clk), .rst(rst),
    .s_arid(s_axi_arid), .s_araddr(s_axi_araddr), .s_arlen(s_axi_arlen),
    .s_arsize(s_axi_arsize), .s_arburst(s_axi_arburst),
    .s_arvalid(s_axi_arvalid), .s_arready(s_axi_arready),
    .s_rid(s_axi_rid), .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp),
    .s_rlast(s_axi_rlast), .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
    .mem_rd_en(mem_rd_en), .mem_rd_addr(mem_rd_addr), .mem_rd_data(mem_rd_data)
  );

  fadc_regs #(.EVT_AW(EVT_AW)) u_regs (
    .clk(clk), .rst(rst),
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .cfg(cfg), .rd_ptr(rd_ptr), .spi_start(spi_start), .spi_addr(spi_addr),
    .spi_data(spi_data), .irq(irq),
    .wr_ptr(wr_ptr), .evt_count(evt_count), .drop_busy(drop_busy),
    .drop_full(drop_full), .rx_aligned(rx_aligned), .rx_ovf(rx_ovf),
    .spi_busy(spi_busy), .evt_busy(evt_busy)
  );

  adc_spi_master #(.CLK_DIV(SPI_DIV)) u_spi (
    .clk(clk), .rst(rst), .start(spi_start), .addr(spi_addr), .data(spi_data),
    .busy(spi_busy), .done(),
    .spi_csn(adc_csn), .spi_sclk(adc_sclk), .spi_sdata(adc_sdata)
  );
endmodule
