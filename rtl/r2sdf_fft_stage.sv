// One radix-2 single-path delay-feedback (R2SDF) butterfly stage of the
// 16-point decimation-in-frequency FFT, interleaved over N_CH channels.
//
// The stage pairs block positions j and j+D (D = 8, 4, 2, 1 for the four
// stages). During the first D samples of every 2D-sample group the input is
// written into the feedback delay and the difference term of the previous
// group leaves, multiplied by the twiddle W_{2D}^j; during the last D samples
// the sum leaves and the difference is fed back. Because the channels are
// interleaved sample by sample, the delay of D samples is a shift register of
// D*N_CH words that advances once per valid input. The word length grows by
// one bit (IW -> IW+1) so that the sum cannot overflow.
//
// Each sample carries its block position (tag). The output tag is the tag of
// the element leaving, (tag - D) mod 16. The output is registered: valid,
// channel, tag and data appear one clock after the input.
module r2sdf_fft_stage
  import ecpc_pkg::*;
#(
  parameter int D    = 8,   // butterfly distance in samples
  parameter int IW   = 16,  // input component width
  parameter int NCH  = 16   // interleaved channels
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [CH_W-1:0]      in_ch,
  input  logic [3:0]           in_tag,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic [CH_W-1:0]      out_ch,
  output logic [3:0]           out_tag,
  output logic signed [IW:0]   out_re,
  output logic signed [IW:0]   out_im
);

  localparam int OW  = IW + 1;
  localparam int LEN = D * NCH;
  localparam int TS  = 8 / D;   // twiddle index step in W16

  logic signed [OW-1:0] dl_re [LEN];
  logic signed [OW-1:0] dl_im [LEN];
  logic signed [OW-1:0] x_re, x_im, d_re, d_im, fb_re, fb_im, o_re, o_im;
  logic signed [OW+16:0] m_re, m_im;
  logic [3:0] c;
  int         j;

  assign x_re = OW'(in_re);
  assign x_im = OW'(in_im);
  assign d_re = dl_re[LEN-1];
  assign d_im = dl_im[LEN-1];

  always_comb begin
    c    = in_tag & 4'(2*D - 1);
    j    = int'(c) * TS;
    m_re = (OW+17)'(d_re) * (OW+17)'(tw_re(j)) - (OW+17)'(d_im) * (OW+17)'(tw_im(j));
    m_im = (OW+17)'(d_re) * (OW+17)'(tw_im(j)) + (OW+17)'(d_im) * (OW+17)'(tw_re(j));
    if (int'(c) < D) begin
      fb_re = x_re;
      fb_im = x_im;
      o_re  = OW'(m_re >>> 14);
      o_im  = OW'(m_im >>> 14);
    end else begin
      fb_re = d_re - x_re;
      fb_im = d_im - x_im;
      o_re  = d_re + x_re;
      o_im  = d_im + x_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) begin
        dl_re[i] <= '0;
        dl_im[i] <= '0;
      end
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_tag   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl_re[0] <= fb_re;
        dl_im[0] <= fb_im;
        for (int i = 1; i < LEN; i++) begin
          dl_re[i] <= dl_re[i-1];
          dl_im[i] <= dl_im[i-1];
        end
        out_ch  <= in_ch;
        out_tag <= in_tag - 4'(D);
        out_re  <= o_re;
        out_im  <= o_im;
      end
    end
  end

endmodule
