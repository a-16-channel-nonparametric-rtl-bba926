// 16-point Hilbert transform of the band-passed data of all 16 channels,
// computed as FFT, rotation in the frequency domain and inverse FFT, and the
// squared magnitude Z = |V_bpf + i*H(V_bpf)|^2 of the analytic signal.
//
// The FFT is four radix-2 SDF stages (decimation in frequency, D = 8,4,2,1),
// its output in bit-reversed bin order. Each bin k is rotated by H(k): -i for
// k = 1..7, 0 for k = 0 and 8, +i for k = 9..15, done by swapping real and
// imaginary parts and changing a sign. The rotated bin times i is added to the
// unrotated bin, so that the inverse transform (four decimation-in-time SDF
// stages, D = 1,2,4,8) returns the analytic signal itself: its real part is
// V_bpf and its imaginary part the Hilbert transform. This addition, which
// saves a separate delay line for V_bpf, is this design's choice; the FFT
// length, the SDF structure, the bit growth of one bit per FFT stage and the
// rotation follow the detector's specification.
//
// The transform works on consecutive blocks of 16 samples per channel.
// Channels must arrive in the order 0..N_CH-1, one sample per in_valid. The
// result for a sample leaves 30 sample periods (the two SDF fill delays)
// later, 10 clocks after the in_valid of the sample then entering; out_re is
// the delayed input (exact up to rounding), out_im its Hilbert transform.
module hilbert_transform
  import ecpc_pkg::*;
#(
  parameter int N_PT = 16,    // transform length (the stage list is for 16)
  parameter int NCH  = N_CH   // interleaved channels
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [CH_W-1:0]            in_ch,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic signed [20:0]         out_re,
  output logic signed [20:0]         out_im,
  output logic [41:0]                out_z
);

  localparam int IW = SAMPLE_W + 4;  // FFT output width (20)
  localparam int W  = IW + 1;        // IFFT width (21)

  // Position of the incoming sample within its 16-sample block
  logic [3:0] n;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n <= '0;
    else if (in_valid && int'(in_ch) == NCH - 1) n <= n + 4'd1;
  end

  // ---- FFT --------------------------------------------------------------
  logic            f_v   [5];
  logic [CH_W-1:0] f_ch  [5];
  logic [3:0]      f_tag [5];
  logic signed [15:0] f0_re, f0_im;
  logic signed [16:0] f1_re, f1_im;
  logic signed [17:0] f2_re, f2_im;
  logic signed [18:0] f3_re, f3_im;
  logic signed [19:0] f4_re, f4_im;

  assign f_v[0]   = in_valid;
  assign f_ch[0]  = in_ch;
  assign f_tag[0] = n;
  assign f0_re    = in_data;
  assign f0_im    = '0;

  r2sdf_fft_stage #(.D(8), .IW(16), .NCH(NCH)) u_f1 (.clk, .rst_n,
    .in_valid(f_v[0]), .in_ch(f_ch[0]), .in_tag(f_tag[0]), .in_re(f0_re), .in_im(f0_im),
    .out_valid(f_v[1]), .out_ch(f_ch[1]), .out_tag(f_tag[1]), .out_re(f1_re), .out_im(f1_im));
  r2sdf_fft_stage #(.D(4), .IW(17), .NCH(NCH)) u_f2 (.clk, .rst_n,
    .in_valid(f_v[1]), .in_ch(f_ch[1]), .in_tag(f_tag[1]), .in_re(f1_re), .in_im(f1_im),
    .out_valid(f_v[2]), .out_ch(f_ch[2]), .out_tag(f_tag[2]), .out_re(f2_re), .out_im(f2_im));
  r2sdf_fft_stage #(.D(2), .IW(18), .NCH(NCH)) u_f3 (.clk, .rst_n,
    .in_valid(f_v[2]), .in_ch(f_ch[2]), .in_tag(f_tag[2]), .in_re(f2_re), .in_im(f2_im),
    .out_valid(f_v[3]), .out_ch(f_ch[3]), .out_tag(f_tag[3]), .out_re(f3_re), .out_im(f3_im));
  r2sdf_fft_stage #(.D(1), .IW(19), .NCH(NCH)) u_f4 (.clk, .rst_n,
    .in_valid(f_v[3]), .in_ch(f_ch[3]), .in_tag(f_tag[3]), .in_re(f3_re), .in_im(f3_im),
    .out_valid(f_v[4]), .out_ch(f_ch[4]), .out_tag(f_tag[4]), .out_re(f4_re), .out_im(f4_im));

  // ---- Rotation: Y(k) = X(k) + i * H(k) X(k) -----------------------------
  logic [3:0]           k;
  logic signed [W-1:0]  x_re, x_im, r_re, r_im, y_re, y_im;
  logic                 g_v   [5];
  logic [CH_W-1:0]      g_ch  [5];
  logic [3:0]           g_tag [5];
  logic signed [W-1:0]  g_re  [5];
  logic signed [W-1:0]  g_im  [5];

  always_comb begin
    k    = {f_tag[4][0], f_tag[4][1], f_tag[4][2], f_tag[4][3]};  // bit reversal
    x_re = W'(f4_re);
    x_im = W'(f4_im);
    if (k == 4'd0 || k == 4'd8) begin        // H = 0
      r_re = '0;
      r_im = '0;
    end else if (k < 4'd8) begin             // H = -i : (re, im) -> (im, -re)
      r_re = x_im;
      r_im = -x_re;
    end else begin                           // H = +i : (re, im) -> (-im, re)
      r_re = -x_im;
      r_im = x_re;
    end
    y_re = x_re - r_im;                      // X + i*R
    y_im = x_im + r_re;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_v[0]   <= 1'b0;
      g_ch[0]  <= '0;
      g_tag[0] <= '0;
      g_re[0]  <= '0;
      g_im[0]  <= '0;
    end else begin
      g_v[0] <= f_v[4];
      if (f_v[4]) begin
        g_ch[0]  <= f_ch[4];
        g_tag[0] <= f_tag[4];
        g_re[0]  <= y_re;
        g_im[0]  <= y_im;
      end
    end
  end

  // ---- IFFT -------------------------------------------------------------
  for (genvar s = 0; s < 4; s++) begin : g_ifft
    r2sdf_ifft_stage #(.D(1 << s), .W(W), .NCH(NCH)) u_i (.clk, .rst_n,
      .in_valid(g_v[s]), .in_ch(g_ch[s]), .in_tag(g_tag[s]), .in_re(g_re[s]), .in_im(g_im[s]),
      .out_valid(g_v[s+1]), .out_ch(g_ch[s+1]), .out_tag(g_tag[s+1]),
      .out_re(g_re[s+1]), .out_im(g_im[s+1]));
  end

  // ---- Squared magnitude ----------------------------------------------
  logic [41:0] z_next;
  assign z_next = 42'($signed(42'(g_re[4])) * $signed(42'(g_re[4])))
                + 42'($signed(42'(g_im[4])) * $signed(42'(g_im[4])));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_re    <= '0;
      out_im    <= '0;
      out_z     <= '0;
    end else begin
      out_valid <= g_v[4];
      if (g_v[4]) begin
        out_ch <= g_ch[4];
        out_re <= g_re[4];
        out_im <= g_im[4];
        out_z  <= z_next;
      end
    end
  end

  if (N_PT != 16) begin : g_bad_len
    $error("hilbert_transform: only the 16-point stage list is provided");
  end

endmodule
