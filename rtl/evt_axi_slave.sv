// evt_axi_slave: AXI4 read-only slave that lets the processor side's central
// DMA engine fetch built events out of the event DPRAM over a 64-bit
// high-performance AXI port.
//
// How it works: one burst at a time. The address channel is accepted in the
// idle state; the word address araddr[3 +: EVT_AW] indexes the event memory,
// so addresses wrap around the memory as the event ring does. The RAM's
// registered output is the R-channel data register itself: a new word is
// read whenever the R register is empty or being taken (rready), which gives
// one beat per clock with no skid buffer. INCR bursts of 1..256 beats are
// supported; FIXED re-reads the same word; WRAP is treated as INCR. Every
// response is OKAY. Transfers are full 64-bit beats (arsize = 3 is assumed).
//
// Timing: arready is high while idle; the first beat appears two cycles
// after the address handshake, then one beat per cycle while rready is high.
//
// The original system description gives the 64-bit AXI path and the DMA transfer; the slave's
// structure and burst support are this design's.
module evt_axi_slave #(
  parameter int unsigned EVT_AW = 12,
  parameter int unsigned ID_W   = 4
) (
  input  logic              clk,
  input  logic              rst,
  // AR channel
  input  logic [ID_W-1:0]   s_arid,
  input  logic [31:0]       s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic [2:0]        s_arsize,
  input  logic [1:0]        s_arburst,
  input  logic              s_arvalid,
  output logic              s_arready,
  // R channel
  output logic [ID_W-1:0]   s_rid,
  output logic [63:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  // event memory read port (registered read)
  output logic              mem_rd_en,
  output logic [EVT_AW-1:0] mem_rd_addr,
  input  logic [63:0]       mem_rd_data
);
  logic              active;
  logic [8:0]        to_issue;
  logic [EVT_AW-1:0] addr;
  logic              fixed;

  logic advance;
  assign advance     = !s_rvalid || s_rready;
  assign mem_rd_en   = active && advance && (to_issue != 0);
  assign mem_rd_addr = addr;
  assign s_arready   = !active;
  assign s_rdata     = mem_rd_data;
  assign s_rresp     = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      active      <= 1'b0;
      to_issue    <= '0;
      addr        <= '0;
      fixed       <= 1'b0;
      s_rid       <= '0;
      s_rvalid    <= 1'b0;
      s_rlast     <= 1'b0;
    end else begin
      if (s_arvalid && s_arready) begin
        active      <= 1'b1;
        s_rid       <= s_arid;
        addr        <= s_araddr[3 +: EVT_AW];
        to_issue    <= 9'(s_arlen) + 9'd1;
        fixed       <= (s_arburst == 2'b00);
      end
      if (advance) begin
        s_rvalid <= mem_rd_en;
        s_rlast  <= mem_rd_en && (to_issue == 9'd1);
      end
      if (mem_rd_en) begin
        to_issue <= to_issue - 9'd1;
        if (!fixed) addr <= addr + 1'b1;
      end
      if (s_rvalid && s_rready && s_rlast) active <= 1'b0;
    end
  end

  // AXI rule: once valid, a beat holds until it is taken
  a_r_stable: assert property (@(posedge clk) disable iff (rst)
    s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata) && $stable(s_rlast));
  // only full-width beats are served
  a_size: assert property (@(posedge clk) disable iff (rst)
    s_arvalid && s_arready |-> s_arsize == 3'd3);
endmodule
