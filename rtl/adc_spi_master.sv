// adc_spi_master: writes one configuration register of the HMCAD1511 over its
// three-wire SPI-like serial port (chip select, clock, data in).
//
// A write is 24 bits sent most significant bit first: an 8-bit register
// address followed by 16 data bits. CSN goes low, SDATA changes while SCLK is
// low and the ADC latches it on each rising SCLK edge; CSN returns high one
// half period after the last falling edge. SCLK is clk / (2*CLK_DIV) and idles
// low. The port is write-only.
//
// Interface: pulse start with addr/data while busy is low; busy stays high for
// the whole transfer (24*2*CLK_DIV + 2*CLK_DIV cycles) and done pulses for
// one cycle at the end.
//
// The original system description says only that every ADC register is reached through a serial
// interface much like SPI; the frame format and timing here follow the usual
// HMCAD1511 write cycle and are not taken from the original description.
module adc_spi_master #(
  parameter int unsigned CLK_DIV = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [7:0]  addr,
  input  logic [15:0] data,
  output logic        busy,
  output logic        done,
  output logic        spi_csn,
  output logic        spi_sclk,
  output logic        spi_sdata
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;
  state_e state;
  logic [23:0] sr;
  logic [4:0]  nbits;
  logic [$clog2(CLK_DIV+1)-1:0] cnt;
  logic tick;
  assign tick = (cnt == ($bits(cnt))'(CLK_DIV - 1));
  assign busy = (state != S_IDLE);
  assign spi_sdata = sr[23];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      sr       <= '0;
      nbits    <= '0;
      cnt      <= '0;
      spi_csn  <= 1'b1;
      spi_sclk <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= (state == S_IDLE || tick) ? '0 : cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          sr      <= {addr, data};
          nbits   <= 5'd24;
          spi_csn <= 1'b0;
          state   <= S_LOW;
        end
        S_LOW: if (tick) begin
          spi_sclk <= 1'b1;
          state    <= S_HIGH;
        end
        S_HIGH: if (tick) begin
          spi_sclk <= 1'b0;
          nbits    <= nbits - 1'b1;
          if (nbits == 5'd1) state <= S_END;
          else begin
            sr    <= {sr[22:0], 1'b0};
            state <= S_LOW;
          end
        end
        S_END: if (tick) begin
          spi_csn <= 1'b1;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
