// tb_adc_spi_master: self-checking test of the ADC configuration writer. A
// small SPI slave model in the testbench shifts in SDATA on every rising SCLK
// edge while CSN is low and records the word when CSN rises. Several random
// address/data pairs are written with two clock dividers; the test checks the
// 24-bit word (address first, MSB first), that exactly 24 rising edges occur,
// that SDATA is stable around each rising edge, the SCLK half period, and
// the transfer time from start to done.
module tb_adc_spi_master;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0, rst = 1'b1;
  always #4 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // two instances with different dividers
  logic        start [2];
  logic [7:0]  addr;
  logic [15:0] data;
  logic        busy [2], done [2], csn [2], sclk [2], sdata [2];

  adc_spi_master #(.CLK_DIV(4)) dut4 (.clk(clk), .rst(rst), .start(start[0]), .addr(addr), .data(data),
    .busy(busy[0]), .done(done[0]), .spi_csn(csn[0]), .spi_sclk(sclk[0]), .spi_sdata(sdata[0]));
  adc_spi_master #(.CLK_DIV(2)) dut2 (.clk(clk), .rst(rst), .start(start[1]), .addr(addr), .data(data),
    .busy(busy[1]), .done(done[1]), .spi_csn(csn[1]), .spi_sclk(sclk[1]), .spi_sdata(sdata[1]));

  // slave models
  logic [23:0] shreg [2];
  int          nbits [2];
  int          last_rise [2];
  int          half_min [2], half_max [2];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar k = 0; k < 2; k++) begin : g_slave
    always @(posedge sclk[k]) if (!csn[k]) begin
      shreg[k] = {shreg[k][22:0], sdata[k]};
      nbits[k]++;
    end
    always @(sclk[k]) if (!csn[k]) begin
      // half period of SCLK, in system clock cycles
      if (last_rise[k] >= 0) begin
        if (cyc - last_rise[k] < half_min[k]) half_min[k] = cyc - last_rise[k];
        if (cyc - last_rise[k] > half_max[k]) half_max[k] = cyc - last_rise[k];
      end
      last_rise[k] = cyc;
    end
    // SDATA must not change while SCLK is high
    always @(sdata[k]) if (!csn[k] && sclk[k]) check(0, "SDATA changed while SCLK high");
  end

  task automatic write(input int k, input logic [7:0] a, input logic [15:0] d, input int div);
    int t0, t1;
    nbits[k] = 0; shreg[k] = '0; last_rise[k] = -1; half_min[k] = 1000; half_max[k] = 0;
    @(negedge clk);
    addr = a; data = d; start[k] = 1'b1; t0 = cyc;
    @(negedge clk);
    start[k] = 1'b0;
    check(busy[k], "busy after start");
    while (!done[k]) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    check(csn[k] && !busy[k], "CSN high and idle after done");
    check(nbits[k] == 24, $sformatf("%0d rising edges", nbits[k]));
    check(shreg[k] == {a, d}, $sformatf("word %h, expected %h", shreg[k], {a, d}));
    check(half_min[k] == div && half_max[k] == div,
          $sformatf("SCLK half period %0d..%0d cycles, expected %0d", half_min[k], half_max[k], div));
    // one cycle to leave idle, 24 full SCLK periods, half a period before CSN rises
    check(t1 - t0 == 1 + 48 * div + div, $sformatf("transfer took %0d cycles", t1 - t0));
  endtask

  initial begin
    start[0] = 1'b0; start[1] = 1'b0; addr = '0; data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    check(csn[0] && csn[1] && !sclk[0] && !sclk[1], "idle levels");
    write(0, 8'h31, 16'h0002, 4);    // e.g. channel-mode register
    write(0, 8'h00, 16'h0001, 4);
    for (int i = 0; i < 4; i++) write(0, 8'($urandom), 16'($urandom), 4);
    for (int i = 0; i < 4; i++) write(1, 8'($urandom), 16'($urandom), 2);
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
