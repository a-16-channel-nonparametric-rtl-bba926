// Per-channel variance estimate and normalisation of Z = |V_st|^2.
//
// The regression engines build histograms of Z divided by the channel's
// variance. The detector's specification only says the data are normalised to
// their estimated variances; the estimator here is this design's choice. The
// mean of Z is twice the variance of V_bpf, so each channel keeps an
// exponential moving average m of Z (time constant 2^EMA_SHIFT samples) and
// the output is Zn = 2*Z/m in unsigned Q8.8, saturated at 255.996. The first
// sample of a channel initialises its average and is reported as Zn = 2.0. The quotient is formed by a
// 16-step restoring divider, combinational.
//
// Interface: a (valid, channel, Z) triple in, (valid, channel, Zn) out one
// clock later. The average used for a sample excludes that sample.
module variance_normalizer
  import ecpc_pkg::*;
#(
  parameter int ZW        = 42,  // width of Z
  parameter int EMA_SHIFT = 12   // averaging time constant, log2 samples
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [CH_W-1:0]    in_ch,
  input  logic [ZW-1:0]      in_z,
  output logic               out_valid,
  output logic [CH_W-1:0]    out_ch,
  output logic [15:0]        out_zn
);

  localparam int AW = ZW + EMA_SHIFT;
  localparam int NW = ZW + ZN_F + 1;   // numerator width of 2*Z*2^8

  logic [AW-1:0] acc  [N_CH];
  logic          init [N_CH];
  logic [ZW-1:0] m;
  logic [AW-1:0] acc_next;
  logic [15:0]   q;

  // Restoring division num/den with a 16-bit quotient, saturating.
  function automatic logic [15:0] udiv16(input logic [NW-1:0] num, input logic [ZW-1:0] den);
    logic [NW+16:0] rem, d;
    logic [15:0]    qq;
    if (den == '0) return (num == '0) ? 16'h0000 : 16'hFFFF;
    if ({17'b0, num} >= ({17'b0, NW'(den)} << 16)) return 16'hFFFF;
    rem = {17'b0, num};
    qq  = '0;
    for (int i = 15; i >= 0; i--) begin
      d = {17'b0, NW'(den)} << i;
      if (rem >= d) begin
        rem   = rem - d;
        qq[i] = 1'b1;
      end
    end
    return qq;
  endfunction

  always_comb begin
    m        = ZW'(acc[in_ch] >> EMA_SHIFT);
    acc_next = init[in_ch] ? acc[in_ch] + AW'(in_z) - AW'(m) : AW'(in_z) << EMA_SHIFT;
    q        = init[in_ch] ? udiv16({in_z, 1'b0, 8'h00}, m) : 16'(2 << ZN_F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        acc[c]  <= '0;
        init[c] <= 1'b0;
      end
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_zn    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc[in_ch]  <= acc_next;
        init[in_ch] <= 1'b1;
        out_ch      <= in_ch;
        out_zn      <= q;
      end
    end
  end

endmodule
