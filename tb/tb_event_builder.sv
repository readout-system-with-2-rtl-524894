// tb_event_builder: self-checking test of the pre-trigger ring and event
// packing. Frames carry their own number ({~n, n}), one every other cycle, so
// every copied word can be checked against the frame number it must hold.
// With a 64-word event memory and 14-word events (pre 4, post 8) the test
// builds an event whose post-trigger frames have not arrived yet, drops a
// trigger while busy, fills the memory until a trigger is dropped for lack of
// room, frees one event and builds one that wraps around the memory end. The
// header words, commit pointer, counters and the copy time for an event
// whose frames are all present are checked.
module tb_event_builder;
  timeunit 1ns; timeprecision 1ps;
  import fadc_pkg::*;

  localparam int EVT_AW = 6;
  localparam int DEPTH  = 2**EVT_AW;
  localparam int PRE = 4, POST = 8, LEN = PRE + POST + 2;

  logic clk = 1'b0, rst = 1'b1;
  always #3 clk = ~clk;

  cfg_t cfg;
  frame_t frame;
  logic frame_valid = 1'b0;
  logic trig_valid = 1'b0;
  logic [TS_W-1:0] trig_ts = '0;
  trig_flags_t trig_flags;
  logic [EVT_AW:0] rd_ptr = '0;
  logic evt_wr_en;
  logic [EVT_AW-1:0] evt_wr_addr;
  logic [63:0] evt_wr_data;
  logic [EVT_AW:0] wr_ptr_commit;
  logic [31:0] evt_count, drop_busy, drop_full;
  logic busy;
  int checks = 0, failures = 0;

  event_builder #(.RING_AW(8), .EVT_AW(EVT_AW)) dut (
    .clk(clk), .rst(rst), .cfg(cfg), .frame(frame), .frame_valid(frame_valid),
    .trig_valid(trig_valid), .trig_ts(trig_ts), .trig_flags(trig_flags), .rd_ptr(rd_ptr),
    .evt_wr_en(evt_wr_en), .evt_wr_addr(evt_wr_addr), .evt_wr_data(evt_wr_data),
    .wr_ptr_commit(wr_ptr_commit), .evt_count(evt_count), .drop_busy(drop_busy),
    .drop_full(drop_full), .busy(busy));

  logic [63:0] mem [DEPTH];
  always @(posedge clk) if (evt_wr_en) mem[evt_wr_addr] <= evt_wr_data;

  // frame source
  int nsent = 0;
  initial begin
    frame = '0;
    wait (!rst);
    forever begin
      @(negedge clk); frame = {~32'(nsent), 32'(nsent)}; frame_valid = 1'b1;
      @(negedge clk); frame_valid = 1'b0; nsent++;
    end
  end

  task automatic trigger(input int ts, input logic [1:0] hit);
    @(negedge clk);
    trig_valid = 1'b1; trig_ts = TS_W'(ts);
    trig_flags = '{rsvd: '0, mode: TRIG_COINC, hit: hit};
    @(negedge clk);
    trig_valid = 1'b0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // check one event starting at word address a
  task automatic check_event(input int a, input int num, input int ts, input logic [1:0] hit);
    logic [63:0] h0, h1;
    h0 = mem[a % DEPTH]; h1 = mem[(a+1) % DEPTH];
    check(h0 == {16'hFADC, 16'(LEN), 32'(num)}, $sformatf("event %0d header0 %h", num, h0));
    check(h1 == {32'(ts), 8'(PRE), 8'(POST), 8'({4'b0, 2'(TRIG_COINC), hit}), 8'h00},
          $sformatf("event %0d header1 %h", num, h1));
    for (int i = 0; i < PRE + POST; i++) begin
      int n;
      n = ts - PRE + i;
      check(mem[(a+2+i) % DEPTH] == {~32'(n), 32'(n)},
            $sformatf("event %0d word %0d = %h, expected frame %0d", num, i, mem[(a+2+i) % DEPTH], n));
    end
  endtask

  initial begin
    int t0;
    cfg = '0; cfg.enable = 1'b1; cfg.pre = 8'(PRE); cfg.post = 8'(POST);
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // event 0: trigger at frame 18 once frame 20 is in; needs frames up to 25
    wait (nsent == 21);
    trigger(18, 2'b11);
    trigger(19, 2'b01);                        // arrives while busy -> dropped
    wait (!busy);
    @(negedge clk);
    check(nsent >= 26, "event 0 finished before its last frame arrived");
    check(wr_ptr_commit == (EVT_AW+1)'(LEN), "commit pointer after event 0");
    check(drop_busy == 1, "drop_busy");
    check_event(0, 0, 18, 2'b11);

    // events 1..3 with all frames present; time the copy of event 1
    wait (nsent == 60);
    @(negedge clk);
    t0 = $time;
    trigger(40, 2'b10);
    wait (!busy);
    // header (2) + frames + one read latency + entry state: LEN + 2 cycles
    check(($time - t0) / 6 <= LEN + 3, $sformatf("copy took %0d cycles", ($time - t0) / 6));
    trigger(45, 2'b11); wait (!busy);
    trigger(50, 2'b11); wait (!busy);
    check(wr_ptr_commit == (EVT_AW+1)'(4*LEN), "commit pointer after 4 events");
    // no room for a fifth
    trigger(55, 2'b11);
    repeat (4) @(negedge clk);
    check(drop_full == 1, "drop_full");
    check(evt_count == 4, "evt_count after overflow");
    check_event(LEN, 1, 40, 2'b10);
    check_event(3*LEN, 3, 50, 2'b11);

    // free event 0, next event wraps around the end of the memory
    rd_ptr = (EVT_AW+1)'(LEN);
    trigger(70, 2'b01);
    wait (!busy);
    @(negedge clk);
    check(evt_count == 5, "evt_count after wrap");
    check(wr_ptr_commit == (EVT_AW+1)'(5*LEN), "commit pointer after wrap");
    check_event(4*LEN, 4, 70, 2'b01);

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
