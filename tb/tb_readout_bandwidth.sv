// tb_readout_bandwidth: workload test of the event readout path at a 125 MHz
// AXI clock, the PS-PL clock at which the original system measured about
// 810 MB/s between its DPRAM and DDR3. The whole design runs at its default
// sizes: the ADC model sends coincident pulse pairs every 300 frames, each
// event is 259 words (header 2, pre 2, post 255), and a DMA-engine model drains the
// event memory with 256-beat bursts and no back-pressure. The test measures
// the bytes moved per cycle while a burst is open and requires at least
// 810 MB/s; it also checks that the receiver keeps up with the ADC at this
// clock (no FIFO overflow), that every expected event arrives, and that each
// event's frame words are consecutive ADC frames.
module tb_readout_bandwidth;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  localparam int NS = 65536, NEV = 12, P0 = 300;

  logic clk = 1'b0, rst = 1'b1;
  always #4 clk = ~clk;            // 125 MHz
  logic lclk, fclk, irq, csn, sclk, sdata;
  logic [7:0] lane;

  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [1:0]  bresp, rresp;
  logic [3:0]  m_rid;
  logic [31:0] m_araddr = '0;
  logic [7:0]  m_arlen = '0;
  logic        m_arvalid = 0, m_arready, m_rlast, m_rvalid;
  logic [63:0] m_rdata;
  logic [1:0]  m_rresp;

  hmcad1511_model #(.NS(NS), .SKEW_BITS(2)) u_adc (
    .single_mode(1'b0), .lclk(lclk), .lane(lane), .fclk(fclk));

  fadc_readout_top dut (
    .lclk(lclk), .lane_in(lane), .fclk_in(fclk), .clk(clk), .rst(rst),
    .ext_trig(1'b0), .irq(irq), .adc_csn(csn), .adc_sclk(sclk), .adc_sdata(sdata),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axi_arid(4'h1), .s_axi_araddr(m_araddr), .s_axi_arlen(m_arlen),
    .s_axi_arsize(3'd3), .s_axi_arburst(2'b01), .s_axi_arvalid(m_arvalid),
    .s_axi_arready(m_arready), .s_axi_rid(m_rid), .s_axi_rdata(m_rdata),
    .s_axi_rresp(m_rresp), .s_axi_rlast(m_rlast), .s_axi_rvalid(m_rvalid),
    .s_axi_rready(1'b1));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(negedge clk); bready = 0;
  endtask
  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(negedge clk); rready = 0;
  endtask

  // sample value = low byte of a per-channel counter, so consecutive frames
  // differ in a known way; pulses overwrite a few samples
  initial begin
    for (int i = 0; i < NS; i++) begin
      u_adc.wave[0][i] = 8'h80 + 8'(i % 5);
      u_adc.wave[1][i] = 8'h80 + 8'(i % 3);
    end
    for (int k = 0; k < NEV; k++) begin
      int m;
      m = P0 + 300 * k;
      for (int j = 0; j < 3; j++) begin
        u_adc.wave[0][4*m + j] = 8'h20;
        u_adc.wave[1][4*m + j] = 8'h20;
      end
    end
  end

  longint beats = 0, burst_cycles = 0;
  int n_evt = 0;
  logic [12:0] rd_ptr = '0;

  task automatic dma(input int word, input int len, ref logic [63:0] q [$]);
    int got = 0, c = 0;
    @(negedge clk);
    m_araddr = 32'((word % 4096) * 8); m_arlen = 8'(len - 1); m_arvalid = 1;
    do @(posedge clk); while (!m_arready);
    @(negedge clk); m_arvalid = 0;
    c = 1;                                    // count from the address handshake
    while (got < len) begin
      @(posedge clk);
      c++;
      if (m_rvalid) begin q.push_back(m_rdata); got++; end
    end
    beats += longint'(len);
    burst_cycles += longint'(c);
  endtask

  initial begin
    logic [31:0] st, wp, ecnt, dfull;
    repeat (5) @(negedge clk);
    rst = 0;
    do reg_read(8'h28, st); while (!st[0]);
    reg_write(8'h04, 32'h0000_7070);
    reg_write(8'h08, 32'd4);
    reg_write(8'h0C, 32'h0000_FF02);          // pre 2, post 255: 259-word events
    reg_write(8'h00, 32'h31);                 // coincidence, enabled
    while (n_evt < NEV) begin
      while (!irq) begin
        @(negedge clk);
        if (u_adc.frame_no > P0 + 300 * NEV + 600) break;
      end
      if (!irq) break;
      reg_read(8'h14, wp);
      while (wp[12:0] != rd_ptr) begin
        logic [63:0] ev [$];
        int len;
        ev.delete();
        dma(int'(rd_ptr[11:0]), 1, ev);
        len = int'(ev[0][47:32]);
        check(ev[0][63:48] == 16'hFADC && len == 259, "header");
        for (int got = 1; got < len; ) begin
          int n;
          n = (len - got > 256) ? 256 : len - got;
          dma(int'(rd_ptr[11:0]) + got, n, ev);
          got += n;
        end
        // frames are consecutive: channel-1 byte 0 steps by 4 samples mod 5
        for (int i = 3; i < len; i++)
          check(ev[i][7:0] == 8'h20 || ev[i-1][7:0] == 8'h20 ||
                ev[i][7:0] == 8'h80 + 8'((int'(ev[i-1][7:0]) - 128 + 4) % 5),
                $sformatf("event %0d frame %0d not consecutive", n_evt, i));
        rd_ptr = rd_ptr + 13'(len);
        reg_write(8'h10, 32'(rd_ptr));
        n_evt++;
      end
    end
    reg_read(8'h18, ecnt);
    reg_read(8'h20, dfull);
    reg_read(8'h28, st);
    check(n_evt == NEV && ecnt == NEV, $sformatf("%0d events read, %0d built, expected %0d", n_evt, ecnt, NEV));
    check(dfull == 0, "no event dropped for lack of room");
    check(!st[1], "receiver kept up with the ADC at 125 MHz");
    begin
      real mbps;
      mbps = real'(beats) * 8.0 / (real'(burst_cycles) * 8.0e-9) / 1.0e6;
      $display("readout: %0d beats in %0d burst cycles = %0.1f MB/s at 125 MHz", beats, burst_cycles, mbps);
      check(mbps >= 810.0, $sformatf("readout bandwidth %0.1f MB/s below 810 MB/s", mbps));
    end
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
