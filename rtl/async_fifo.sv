// async_fifo: dual-clock FIFO with Gray-coded pointers, used to move ADC
// frames from the LVDS bit-clock domain into the system (AXI) clock domain.
// Each pointer is passed to the other domain through a two-flop
// synchroniser, so full and empty are conservative. The read side is
// first-word-fall-through: rd_data is valid whenever empty is low, and rd_en
// pops it. Depth is 2**AW.
module async_fifo #(
  parameter int unsigned W  = 64,
  parameter int unsigned AW = 3
) (
  input  logic         wclk,
  input  logic         wrst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n, wgray_n, rgray_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_n  = wbin + (AW+1)'(wr_en && !full);
  assign wgray_n = bin2gray(wbin_n);
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end
  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n; wgray <= wgray_n;
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
    end
  end
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  // read domain
  assign rbin_n  = rbin + (AW+1)'(rd_en && !empty);
  assign rgray_n = bin2gray(rbin_n);
  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n; rgray <= rgray_n;
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
    end
  end
  assign empty   = (rgray == wgray_r2);
  assign rd_data = mem[rbin[AW-1:0]];
endmodule
