// SPI write port for the band-pass filter coefficients.
//
// An external controller programs the 25 filter coefficients (8 biquads x 3
// plus the overall gain) at any time, also while the filter runs. The
// detector's specification names an SPI link for this; the frame format
// below is this design's own.
//
// Protocol: SPI mode 0 (data sampled on the rising SCLK edge), MSB first,
// 32-bit frames while spi_cs_n is low:
//   bits 31..29 zero, 28..24 coefficient address, 23..20 zero, 19..0 value.
// SCLK, CS and MOSI are sampled by clk through two-flop synchronisers, so
// SCLK must be below clk/4. After the 32nd bit wr_en pulses for one clock
// with wr_addr/wr_data. Raising spi_cs_n aborts a partial frame.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spi_sclk,
  input  logic        spi_cs_n,
  input  logic        spi_mosi,
  output logic        wr_en,
  output logic [4:0]  wr_addr,
  output logic [19:0] wr_data
);

  logic [2:0]  sclk_s;   // [0],[1] synchroniser, [2] previous value
  logic [1:0]  cs_s;
  logic [1:0]  mosi_s;
  logic [31:0] sr;
  logic [5:0]  nbits;
  logic        rise;
  logic [31:0] sr_next;

  assign rise    = sclk_s[1] & ~sclk_s[2];
  assign sr_next = {sr[30:0], mosi_s[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s  <= '0;
      cs_s    <= '1;
      mosi_s  <= '0;
      sr      <= '0;
      nbits   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], spi_sclk};
      cs_s   <= {cs_s[0], spi_cs_n};
      mosi_s <= {mosi_s[0], spi_mosi};
      wr_en  <= 1'b0;
      if (cs_s[1]) begin
        nbits <= '0;
      end else if (rise) begin
        sr <= sr_next;
        if (nbits == 6'd31) begin
          nbits   <= '0;
          wr_en   <= 1'b1;
          wr_addr <= sr_next[28:24];
          wr_data <= sr_next[19:0];
        end else begin
          nbits <= nbits + 6'd1;
        end
      end
    end
  end

endmodule
