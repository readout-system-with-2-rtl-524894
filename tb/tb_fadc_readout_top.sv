// tb_fadc_readout_top: end-to-end test of the whole readout at its default
// sizes (4096-word event memory, 256-frame ring). An HMCAD1511 model drives
// the LVDS lanes with a noisy baseline and scheduled PMT-like negative pulses;
// the testbench plays the ARM software (AXI4-Lite register accesses, an
// interrupt-driven readout loop) and the DMA engine (AXI4 read bursts with
// random back-pressure on the event port), and checks every event it reads:
// header, event number, trigger frame, flags, and every sample word against
// the model's waveform.
//
// Phases (model frame numbers):
//   A  200..2000   coincidence: pairs in one frame, pairs 2 frames apart,
//                  lone pulses (no trigger), pairs followed by a second pair
//                  10 frames later (dropped: builder busy)
//   B  2500..4000  anticoincidence: lone pulses trigger, pairs are vetoed
//   C  4500..9600  coincidence with 255 post-trigger frames and readout held
//                  off, until the event memory is full and triggers are dropped
//   E  16000..     external trigger
//   D  18500..     ADC switched to single-channel mode over the serial port,
//                  single-channel trigger
// Each mechanism (alignment, coincidence, veto, anticoincidence, busy drop,
// full drop, memory wrap, external and single-channel triggers, serial
// write, back-pressure) is counted and must occur at least once. The rate
// checks: no frame lost (trigger frames match the model 1:1, which also
// checks one frame per 8 ns), and one 64-bit beat per clock on the event
// port without back-pressure.
module tb_fadc_readout_top;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  localparam int NS    = 262144;
  localparam int DEPTH = 4096;     // default event memory, words

  logic clk = 1'b0, rst = 1'b1, ext_trig = 1'b0, single_mode = 1'b0;
  always #3.333 clk = ~clk;        // 150 MHz AXI clock
  logic lclk, fclk, irq, adc_csn, adc_sclk, adc_sdata;
  logic [7:0] lane;

  logic [7:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = 4'hF;
  logic [1:0]  bresp, rresp;
  logic [3:0]  m_arid = '0, m_rid;
  logic [31:0] m_araddr = '0;
  logic [7:0]  m_arlen = '0;
  logic        m_arvalid = 0, m_arready, m_rlast, m_rvalid, m_rready;
  logic [63:0] m_rdata;
  logic [1:0]  m_rresp;

  hmcad1511_model #(.NS(NS), .SKEW_BITS(5)) u_adc (
    .single_mode(single_mode), .lclk(lclk), .lane(lane), .fclk(fclk));

  fadc_readout_top dut (
    .lclk(lclk), .lane_in(lane), .fclk_in(fclk), .clk(clk), .rst(rst),
    .ext_trig(ext_trig), .irq(irq),
    .adc_csn(adc_csn), .adc_sclk(adc_sclk), .adc_sdata(adc_sdata),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axi_arid(m_arid), .s_axi_araddr(m_araddr), .s_axi_arlen(m_arlen),
    .s_axi_arsize(3'd3), .s_axi_arburst(2'b01), .s_axi_arvalid(m_arvalid),
    .s_axi_arready(m_arready), .s_axi_rid(m_rid), .s_axi_rdata(m_rdata),
    .s_axi_rresp(m_rresp), .s_axi_rlast(m_rlast), .s_axi_rvalid(m_rvalid),
    .s_axi_rready(m_rready));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ waveform
  function automatic logic [7:0] noise(input int i, input int c);
    logic [31:0] h;
    h = 32'(i) * 32'h9E37_79B1 + 32'(c) * 32'h85EB_CA6B;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    return 8'(8'h7D + 8'(h % 7));
  endfunction
  localparam logic [7:0] SHAPE [6] = '{8'h30, 8'h20, 8'h40, 8'h60, 8'h74, 8'h7A};
  task automatic put_pulse(input int c, input int sample);
    for (int j = 0; j < 6; j++) u_adc.wave[c][(sample + j) % NS] = SHAPE[j];
  endtask
  function automatic logic [63:0] model_frame(input int m, input bit single);
    logic [63:0] w;
    for (int l = 0; l < 8; l++)
      w[8*l +: 8] = single ? u_adc.wave[0][(8*m + l) % NS] : u_adc.wave[l/4][(4*m + l%4) % NS];
    return w;
  endfunction

  // expected events, in order
  typedef struct { int m; trig_mode_e mode; logic [1:0] hit; bit single; bit ts_known; int pre; int post; } exp_t;
  exp_t exp_q [$];
  int exp_busy = 0, exp_full = 0;

  localparam int A0 = 200, NA = 30, B0 = 2500, NB = 24, C0 = 4500, NC = 17, E0 = 16000, D0 = 19000;

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < NS; i++) u_adc.wave[c][i] = noise(i, c);
    // A: coincidence
    for (int k = 0; k < NA; k++) begin
      int m;
      m = A0 + 60 * k;
      case (k % 4)
        0: begin put_pulse(0, 4*m); put_pulse(1, 4*m);
                 exp_q.push_back('{m, TRIG_COINC, 2'b11, 0, 1, 8, 24}); end
        1: begin put_pulse(0, 4*m); put_pulse(1, 4*(m+2));
                 exp_q.push_back('{m, TRIG_COINC, 2'b11, 0, 1, 8, 24}); end
        2: put_pulse(0, 4*m);
        3: begin put_pulse(0, 4*m); put_pulse(1, 4*m);
                 put_pulse(0, 4*(m+10)); put_pulse(1, 4*(m+10));
                 exp_q.push_back('{m, TRIG_COINC, 2'b11, 0, 1, 8, 24}); exp_busy++; end
      endcase
    end
    // B: anticoincidence, window 4
    for (int k = 0; k < NB; k++) begin
      int m;
      m = B0 + 60 * k;
      case (k % 4)
        0: begin put_pulse(0, 4*m); exp_q.push_back('{m, TRIG_ANTI, 2'b01, 0, 1, 8, 24}); end
        1: begin put_pulse(0, 4*m); put_pulse(1, 4*m); end
        2: begin put_pulse(1, 4*m); exp_q.push_back('{m, TRIG_ANTI, 2'b10, 0, 1, 8, 24}); end
        3: begin put_pulse(0, 4*m); put_pulse(1, 4*(m+3)); end
      endcase
    end
    // C: fill the event memory, 259-word events
    for (int k = 0; k < NC; k++) begin
      int m;
      m = C0 + 300 * k;
      put_pulse(0, 4*m); put_pulse(1, 4*m);
      if (k < 15) exp_q.push_back('{m, TRIG_COINC, 2'b11, 0, 1, 2, 255});
      else exp_full++;
    end
    // E: three external triggers (frame not known exactly)
    for (int k = 0; k < 3; k++) exp_q.push_back('{E0 + 200*k, TRIG_EXT, 2'b00, 0, 0, 8, 24});
    // D: single channel, pulses on input 1 at 8 samples per frame
    for (int k = 0; k < 10; k++) begin
      int m;
      m = D0 + 60 * k;
      put_pulse(0, 8*m + (k % 8));
      exp_q.push_back('{m, TRIG_SINGLE, 2'b01, 1, 1, 8, 24});
    end
  end

  // ------------------------------------------------------------ AXI-Lite master
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

  // ------------------------------------------------------------ DMA reader
  bit bp = 1;
  int n_bp = 0;
  always @(negedge clk) m_rready <= bp ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (m_rvalid && !m_rready) n_bp++;
  int fast_bursts = 0;

  task automatic dma_read(input int word, input int len, ref logic [63:0] buf_q [$]);
    int beat = 0, first = -1, cyc = 0;
    @(negedge clk);
    m_araddr = 32'((word % DEPTH) * 8); m_arlen = 8'(len - 1); m_arvalid = 1;
    do @(posedge clk); while (!m_arready);
    @(negedge clk); m_arvalid = 0;
    while (beat < len) begin
      @(posedge clk);
      cyc++;
      if (m_rvalid && m_rready) begin
        if (first < 0) first = cyc;
        buf_q.push_back(m_rdata);
        check(m_rlast == (beat == len - 1), "rlast");
        beat++;
      end
    end
    if (!bp && len > 8) begin
      check(cyc - first == len - 1, $sformatf("burst of %0d beats took %0d cycles", len, cyc - first + 1));
      fast_bursts++;
    end
  endtask

  // ------------------------------------------------------------ event checking
  int   f0 = 0;          // model frame number of the design's frame 0
  bit   f0_known = 0;
  int   n_evt = 0, n_coinc = 0, n_anti = 0, n_single = 0, n_ext = 0, n_wrap = 0;
  logic [EVT_AW_TB:0] rd_ptr = '0;
  localparam int EVT_AW_TB = 12;

  task automatic check_event(ref logic [63:0] ev [$]);
    exp_t e;
    logic [31:0] ts;
    int pre, post;
    trig_mode_e mode;
    logic [1:0] hit;
    check(ev[0][63:48] == 16'hFADC, "magic");
    check(ev[0][31:0] == 32'(n_evt), $sformatf("event number %0d, expected %0d", ev[0][31:0], n_evt));
    ts = ev[1][63:32]; pre = int'(ev[1][31:24]); post = int'(ev[1][23:16]);
    mode = trig_mode_e'(ev[1][11:10]); hit = ev[1][9:8];
    check(int'(ev[0][47:32]) == pre + post + 2 && ev.size() == pre + post + 2, "event length");
    if (exp_q.size() == 0) begin check(0, "unexpected event"); return; end
    e = exp_q.pop_front();
    check(mode == e.mode && hit == e.hit && pre == e.pre && post == e.post,
          $sformatf("event %0d: mode %0d hit %b pre %0d post %0d, expected frame %0d mode %0d hit %b",
                    n_evt, mode, hit, pre, post, e.m, e.mode, e.hit));
    if (!f0_known) begin
      // locate the design's frame numbering in the model from the first event
      for (int m = 0; m < 20000; m++)
        if (model_frame(m, 0) == ev[2] && model_frame(m + 1, 0) == ev[3]) begin
          f0 = m - (int'(ts) - pre); f0_known = 1; break;
        end
      check(f0_known, "first event's samples not found in the model");
    end
    if (e.ts_known)
      check(int'(ts) + f0 == e.m, $sformatf("event %0d at model frame %0d, expected %0d", n_evt, int'(ts) + f0, e.m));
    for (int i = 0; i < pre + post; i++) begin
      int m;
      m = int'(ts) - pre + i + f0;
      check(ev[2+i] == model_frame(m, e.single),
            $sformatf("event %0d word %0d = %h, model frame %0d = %h", n_evt, i, ev[2+i], m, model_frame(m, e.single)));
    end
    case (mode)
      TRIG_COINC:  n_coinc++;
      TRIG_ANTI:   n_anti++;
      TRIG_SINGLE: n_single++;
      TRIG_EXT:    n_ext++;
    endcase
    n_evt++;
  endtask

  bit readout_on = 1;
  bit seq_done = 0;
  task automatic drain();
    logic [31:0] wp;
    reg_read(8'h14, wp);
    while (wp[EVT_AW_TB:0] != rd_ptr) begin
      logic [63:0] ev [$];
      int len, got;
      ev.delete();
      dma_read(int'(rd_ptr[EVT_AW_TB-1:0]), 2, ev);
      len = int'(ev[0][47:32]);
      got = 2;
      while (got < len) begin
        int n = (len - got > 256) ? 256 : len - got;
        dma_read(int'(rd_ptr[EVT_AW_TB-1:0]) + got, n, ev);
        got += n;
      end
      if (int'(rd_ptr[EVT_AW_TB-1:0]) + len > DEPTH) n_wrap++;
      check_event(ev);
      rd_ptr = rd_ptr + (EVT_AW_TB+1)'(len);
      reg_write(8'h10, 32'(rd_ptr));
    end
  endtask

  // ------------------------------------------------------------ main
  int n_spi_bits = 0;
  logic [23:0] spi_word;
  always @(posedge adc_sclk) if (!adc_csn) begin spi_word = {spi_word[22:0], adc_sdata}; n_spi_bits++; end

  task automatic wait_frame(input int m);
    while (u_adc.frame_no < m) @(negedge clk);
  endtask
  task automatic set_mode(input logic [31:0] ctrl, input logic [31:0] evtwin);
    reg_write(8'h00, ctrl & ~32'h1);     // disable while changing
    reg_write(8'h0C, evtwin);
    reg_write(8'h00, ctrl);
  endtask

  logic [31:0] st, dbusy, dfull, ecnt;
  int n_aligned = 0;
  initial begin
    repeat (5) @(negedge clk);
    rst = 1'b0;
    // wait for LVDS lock
    do reg_read(8'h28, st); while (!st[0]);
    n_aligned++;
    reg_write(8'h04, 32'h0000_7070);
    reg_write(8'h08, 32'd4);
    set_mode(32'h31, 32'h1808);                          // coincidence, pre 8 post 24
    fork
      begin : readout
        while (!seq_done) begin
          if (irq && readout_on) drain();
          else @(negedge clk);
        end
      end
      begin : sequence_
        // A: one burst run without back-pressure to measure the port rate
        wait_frame(A0 + 60 * 4 + 40);
        bp = 0;
        wait_frame(A0 + 60 * 8 + 40);
        bp = 1;
        wait_frame(B0 - 100);
        set_mode(32'h35, 32'h1808);                      // anticoincidence
        wait_frame(C0 - 200);
        while (irq) @(negedge clk);
        readout_on = 0;
        set_mode(32'h31, 32'hFF02);                      // pre 2, post 255
        wait_frame(C0 + 300 * NC + 300);
        reg_read(8'h20, dfull);
        check(dfull == 32'(exp_full), $sformatf("drop_full %0d, expected %0d", dfull, exp_full));
        readout_on = 1;
        wait_frame(E0 - 300);
        while (irq) @(negedge clk);
        set_mode(32'h3D, 32'h1808);                      // external trigger
        for (int k = 0; k < 3; k++) begin
          wait_frame(E0 + 200 * k);
          @(negedge clk); ext_trig = 1;
          repeat (20) @(negedge clk); ext_trig = 0;
        end
        // D: switch the ADC to single-channel mode through its serial port
        wait_frame(D0 - 500);
        reg_write(8'h00, 32'h30);
        reg_write(8'h24, 32'h0031_0001);
        do reg_read(8'h28, st); while (st[2]);
        check(n_spi_bits == 24 && spi_word == 24'h31_0001, $sformatf("ADC serial word %h", spi_word));
        single_mode = 1;
        set_mode(32'h3B, 32'h1808);                      // single-channel mode and trigger
        wait_frame(D0 + 60 * 10 + 100);
        while (irq) @(negedge clk);
        readout_on = 0;
        seq_done = 1;
      end
    join

    reg_read(8'h1C, dbusy);
    reg_read(8'h20, dfull);
    reg_read(8'h18, ecnt);
    reg_read(8'h28, st);
    check(dbusy == 32'(exp_busy), $sformatf("drop_busy %0d, expected %0d", dbusy, exp_busy));
    check(dfull == 32'(exp_full), $sformatf("drop_full %0d", dfull));
    check(ecnt == 32'(n_evt), $sformatf("evt_count %0d, read %0d", ecnt, n_evt));
    check(exp_q.size() == 0, $sformatf("%0d expected events never read", exp_q.size()));
    check(st[0] && !st[1], "receiver still aligned, no overflow");

    $display("mechanisms: aligned=%0d coinc=%0d anti=%0d single=%0d ext=%0d busy_drops=%0d full_drops=%0d wraps=%0d spi_bits=%0d backpressure=%0d fast_bursts=%0d",
             n_aligned, n_coinc, n_anti, n_single, n_ext, dbusy, dfull, n_wrap, n_spi_bits, n_bp, fast_bursts);
    check(n_aligned > 0, "alignment never happened");
    check(n_coinc > 0, "no coincidence event");
    check(n_anti > 0, "no anticoincidence event");
    check(n_single > 0, "no single-channel event");
    check(n_ext > 0, "no external-trigger event");
    check(dbusy > 0, "no busy drop");
    check(dfull > 0, "no full drop");
    check(n_wrap > 0, "event memory never wrapped");
    check(n_spi_bits > 0, "no serial write");
    check(n_bp > 0, "no back-pressure");
    check(fast_bursts > 0, "no unthrottled burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
