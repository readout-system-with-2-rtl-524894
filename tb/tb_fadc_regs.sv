// tb_fadc_regs: self-checking test of the AXI4-Lite register block. An
// AXI4-Lite master in the testbench reads the reset values, writes every
// read-write register (including a partial byte-strobe write) and checks both
// the read-back and the decoded configuration fields, checks that the
// read-only registers show the status inputs, that a SPI_CMD write produces a
// single start pulse with the right address/data (and none while the serial
// port is busy), and that irq follows WR_PTR != RD_PTR.
module tb_fadc_regs;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  localparam int EVT_AW = 12;
  logic clk = 1'b0, rst = 1'b1;
  always #4 clk = ~clk;

  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '0;
  logic [1:0]  bresp, rresp;
  cfg_t        cfg;
  logic [EVT_AW:0] rd_ptr, wr_ptr = '0;
  logic        spi_start, irq;
  logic [7:0]  spi_addr;
  logic [15:0] spi_data;
  logic [31:0] evt_count = 32'd17, drop_busy = 32'd3, drop_full = 32'd5;
  logic        rx_aligned = 1, rx_ovf = 0, spi_busy = 0, evt_busy = 1;
  int checks = 0, failures = 0, nstart = 0;

  fadc_regs #(.EVT_AW(EVT_AW)) dut (
    .clk(clk), .rst(rst),
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata),
    .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp),
    .s_bvalid(bvalid), .s_bready(bready), .s_araddr(araddr), .s_arvalid(arvalid),
    .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid),
    .s_rready(rready), .cfg(cfg), .rd_ptr(rd_ptr), .spi_start(spi_start),
    .spi_addr(spi_addr), .spi_data(spi_data), .irq(irq), .wr_ptr(wr_ptr),
    .evt_count(evt_count), .drop_busy(drop_busy), .drop_full(drop_full),
    .rx_aligned(rx_aligned), .rx_ovf(rx_ovf), .spi_busy(spi_busy), .evt_busy(evt_busy));

  always @(posedge clk) if (spi_start) nstart++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic axil_write(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = be; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "bresp");
    @(negedge clk); bready = 0;
  endtask

  task automatic axil_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "rresp");
    @(negedge clk); rready = 0;
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [31:0] exp);
    logic [31:0] d;
    axil_read(a, d);
    check(d == exp, $sformatf("reg %h = %h, expected %h", a, d, exp));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // reset values
    expect_reg(8'h00, 32'h30);
    expect_reg(8'h04, 32'h7070);
    expect_reg(8'h08, 32'd4);
    expect_reg(8'h0C, 32'h1808);
    check(!cfg.enable && cfg.mode == TRIG_COINC && cfg.neg_pol == 2'b11, "reset cfg");
    // control
    axil_write(8'h00, 32'h0000_0017);           // enable, single, mode 1 (anti), pol 01
    check(cfg.enable && cfg.single_mode && cfg.mode == TRIG_ANTI && cfg.neg_pol == 2'b01,
          "cfg from CTRL");
    axil_write(8'h04, 32'h0000_9A65);
    check(cfg.thresh[0] == 8'h65 && cfg.thresh[1] == 8'h9A, "thresholds");
    axil_write(8'h04, 32'h0000_4400, 4'b0010);  // only byte 1
    check(cfg.thresh[0] == 8'h65 && cfg.thresh[1] == 8'h44, "byte-strobe write");
    expect_reg(8'h04, 32'h4465);
    axil_write(8'h08, 32'd9);
    check(cfg.window == 8'd9, "window");
    axil_write(8'h0C, 32'h0000_2010);
    check(cfg.pre == 8'h10 && cfg.post == 8'h20, "pre/post");
    // status inputs
    expect_reg(8'h18, 32'd17);
    expect_reg(8'h1C, 32'd3);
    expect_reg(8'h20, 32'd5);
    expect_reg(8'h28, 32'b01001);              // aligned, evt busy, no irq
    // pointers and irq
    check(!irq, "no irq while pointers equal");
    wr_ptr = 13'd42;
    @(negedge clk);
    check(irq, "irq when events wait");
    expect_reg(8'h14, 32'd42);
    expect_reg(8'h28, 32'b11001);
    axil_write(8'h10, 32'd42);
    check(rd_ptr == 13'd42 && !irq, "rd_ptr written, irq cleared");
    expect_reg(8'h10, 32'd42);
    // ADC serial write
    nstart = 0;
    axil_write(8'h24, 32'h0031_0002);
    @(negedge clk);
    check(nstart == 1 && spi_addr == 8'h31 && spi_data == 16'h0002, "SPI start pulse");
    spi_busy = 1;
    axil_write(8'h24, 32'h0046_1234);
    @(negedge clk);
    check(nstart == 1 && spi_addr == 8'h31, "SPI command ignored while busy");
    spi_busy = 0;
    expect_reg(8'h24, 32'h0031_0002);
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
