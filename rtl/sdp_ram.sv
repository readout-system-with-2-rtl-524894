// sdp_ram: simple dual-port RAM, one write port and one read port on the same
// clock, with a registered read (one cycle from rd_en/rd_addr to rd_data,
// which then holds until the next rd_en). Written as an array so that an FPGA
// flow maps it to block RAM. The contents are not reset.
module sdp_ram #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
