// tb_evt_axi_slave: self-checking test of the AXI4 read port on the event
// memory. The memory (EVT_AW = 8) is filled with a known pattern through its
// write port; the testbench then acts as the DMA engine and issues INCR
// bursts of several lengths, one crossing the end of the memory, and a FIXED
// burst, first with rready held high and then with random back-pressure.
// Every beat's data, rid, rresp and rlast are checked, as are the beat count
// and, without back-pressure, the burst time (first beat two cycles after
// the address, then one beat per cycle).
module tb_evt_axi_slave;
  timeunit 1ns; timeprecision 1ps;

  localparam int EVT_AW = 8;
  localparam int DEPTH  = 2**EVT_AW;

  logic clk = 1'b0, rst = 1'b1;
  always #3 clk = ~clk;

  logic [3:0]  arid;
  logic [31:0] araddr;
  logic [7:0]  arlen;
  logic [2:0]  arsize;
  logic [1:0]  arburst;
  logic        arvalid = 1'b0, arready;
  logic [3:0]  rid;
  logic [63:0] rdata;
  logic [1:0]  rresp;
  logic        rlast, rvalid, rready = 1'b0;
  logic        mem_rd_en, wr_en = 1'b0;
  logic [EVT_AW-1:0] mem_rd_addr, wr_addr;
  logic [63:0] mem_rd_data, wr_data;
  int checks = 0, failures = 0;

  sdp_ram #(.W(64), .AW(EVT_AW)) u_mem (
    .clk(clk), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data));

  evt_axi_slave #(.EVT_AW(EVT_AW), .ID_W(4)) dut (
    .clk(clk), .rst(rst),
    .s_arid(arid), .s_araddr(araddr), .s_arlen(arlen), .s_arsize(arsize),
    .s_arburst(arburst), .s_arvalid(arvalid), .s_arready(arready),
    .s_rid(rid), .s_rdata(rdata), .s_rresp(rresp), .s_rlast(rlast),
    .s_rvalid(rvalid), .s_rready(rready),
    .mem_rd_en(mem_rd_en), .mem_rd_addr(mem_rd_addr), .mem_rd_data(mem_rd_data));

  function automatic logic [63:0] pattern(input int a);
    return {32'hA5A5_0000 | 32'(a), ~32'(a * 7)};
  endfunction

  bit backpressure = 0;
  always @(negedge clk) rready <= backpressure ? 1'($urandom_range(0, 1)) : 1'b1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one burst; returns cycles from address handshake to last beat
  task automatic burst(input int word, input int len, input logic [1:0] bt, input logic [3:0] id,
                       output int cycles);
    int beat = 0, c = 0;
    @(negedge clk);
    arid = id; araddr = 32'(word * 8); arlen = 8'(len - 1); arsize = 3'd3; arburst = bt;
    arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 1'b0;
    while (beat < len) begin
      @(posedge clk);
      c++;
      if (rvalid && rready) begin
        int a;
        a = (bt == 2'b00) ? word % DEPTH : (word + beat) % DEPTH;
        check(rdata == pattern(a), $sformatf("burst @%0d beat %0d data %h", word, beat, rdata));
        check(rid == id && rresp == 2'b00, "rid/rresp");
        check(rlast == (beat == len - 1), $sformatf("rlast at beat %0d of %0d", beat, len));
        beat++;
      end
      if (c > 2000) begin check(0, "burst stalled"); break; end
    end
    cycles = c;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1'b1; wr_addr = EVT_AW'(a); wr_data = pattern(a);
    end
    @(negedge clk); wr_en = 1'b0;

    burst(0, 1, 2'b01, 4'h1, cyc);
    burst(10, 16, 2'b01, 4'h2, cyc);
    check(cyc == 16 + 1, $sformatf("16-beat burst took %0d cycles after the address", cyc));
    burst(DEPTH - 5, 12, 2'b01, 4'h3, cyc);      // wraps over the memory end
    burst(100, 256, 2'b01, 4'h4, cyc);
    check(cyc == 256 + 1, $sformatf("256-beat burst took %0d cycles", cyc));
    burst(33, 4, 2'b00, 4'h5, cyc);              // FIXED
    backpressure = 1;
    burst(7, 64, 2'b01, 4'h6, cyc);
    burst(200, 100, 2'b01, 4'h7, cyc);
    repeat (5) @(negedge clk);
    check(!rvalid && arready, "idle after the last burst");

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
