// One radix-2 single-path delay-feedback stage of the 16-point inverse FFT,
// decimation in time, interleaved over N_CH channels.
//
// It is the transpose of r2sdf_fft_stage: the stages run with D = 1, 2, 4, 8,
// take the FFT's bit-reversed output order directly and deliver natural time
// order. In the last D samples of a 2D-sample group the input b (position
// j+D) is multiplied by the conjugate twiddle W_{2D}^-j and combined with the
// stored a (position j): (a+b)/2 leaves and (a-b)/2 is fed back; in the first
// D samples the stored difference leaves and the input is stored. The halving
// in every stage gives the 1/16 of the inverse transform and keeps the word
// length W constant. The D-sample delay is a D*N_CH-word shift register.
//
// Output registered one clock after the input; out_tag = (tag - D) mod 16.
module r2sdf_ifft_stage
  import ecpc_pkg::*;
#(
  parameter int D   = 1,   // butterfly distance in samples
  parameter int W   = 21,  // component width
  parameter int NCH = 16   // interleaved channels
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [CH_W-1:0]     in_ch,
  input  logic [3:0]          in_tag,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [CH_W-1:0]     out_ch,
  output logic [3:0]          out_tag,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int LEN = D * NCH;
  localparam int TS  = 8 / D;

  logic signed [W-1:0]  dl_re [LEN];
  logic signed [W-1:0]  dl_im [LEN];
  logic signed [W-1:0]  d_re, d_im, fb_re, fb_im, o_re, o_im;
  logic signed [W+16:0] m_re, m_im;
  logic signed [W:0]    b_re, b_im, s_re, s_im, t_re, t_im;
  logic [3:0] c;
  int         j;

  assign d_re = dl_re[LEN-1];
  assign d_im = dl_im[LEN-1];

  always_comb begin
    c = in_tag & 4'(2*D - 1);
    j = (int'(c) - D) * TS;
    if (j < 0) j = 0;
    // b * conj(W16^j)
    m_re = (W+17)'(in_re) * (W+17)'(tw_re(j)) + (W+17)'(in_im) * (W+17)'(tw_im(j));
    m_im = (W+17)'(in_im) * (W+17)'(tw_re(j)) - (W+17)'(in_re) * (W+17)'(tw_im(j));
    b_re = (W+1)'(m_re >>> 14);
    b_im = (W+1)'(m_im >>> 14);
    s_re = (W+1)'(d_re) + b_re;
    s_im = (W+1)'(d_im) + b_im;
    t_re = (W+1)'(d_re) - b_re;
    t_im = (W+1)'(d_im) - b_im;
    if (int'(c) < D) begin
      fb_re = in_re;
      fb_im = in_im;
      o_re  = d_re;
      o_im  = d_im;
    end else begin
      fb_re = W'(t_re >>> 1);
      fb_im = W'(t_im >>> 1);
      o_re  = W'(s_re >>> 1);
      o_im  = W'(s_im >>> 1);
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
