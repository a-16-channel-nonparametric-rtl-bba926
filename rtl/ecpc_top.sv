// 16-channel EC-PC spike detector.
//
// The detector takes the serial, time-division multiplexed 16-bit samples of
// 16 channels (40 kHz each, one 32-bit frame per channel slot, 20.48 MHz
// bit clock) and delivers three serial streams in the same framing:
//   lfp_sout   field potentials (250 Hz low-pass),
//   bpf_sout   band-passed spike signal (programmable elliptic band-pass),
//   prob_sout  spiking-probability map, one winner-take-all score per
//              channel per 64 samples.
// Datapath: frame_decoder -> bandpass_filter -> hilbert_transform ->
// variance_normalizer -> four ecpc_regression_engines (training) and
// probability_estimator (scoring) -> frame_encoder. The LFP path is
// frame_decoder -> lfp_filter -> frame_encoder. All blocks are shared by the
// 16 channels (16-fold interleaving) except the regression engines, of which
// each serves four channels in turn, so that every channel is retrained for
// T_TRAIN samples out of every 4*T_TRAIN. Band-pass coefficients are written
// through the SPI port.
//
// trained shows which channels have EC-PC parameters; until a channel has
// them, its scores are 0 (the first 4*T_TRAIN samples, 10 s at defaults).
module ecpc_top
  import ecpc_pkg::*;
#(
  parameter int T_TRAIN = 100000   // training samples per channel (2.5 s)
) (
  input  logic            clk,        // 20.48 MHz
  input  logic            rst_n,
  input  logic            sin,        // serial input frames
  input  logic            spi_sclk,
  input  logic            spi_cs_n,
  input  logic            spi_mosi,
  output logic            lfp_sout,
  output logic            bpf_sout,
  output logic            prob_sout,
  output logic [N_CH-1:0] trained,
  output logic            frame_err
);

  // input
  logic                       x_v;
  logic [CH_W-1:0]            x_ch;
  logic signed [SAMPLE_W-1:0] x_d;

  frame_decoder u_dec (.clk, .rst_n, .sin, .out_valid(x_v), .out_ch(x_ch), .out_data(x_d),
                       .frame_err);

  // field potentials
  logic                       l_v;
  logic [CH_W-1:0]            l_ch;
  logic signed [SAMPLE_W-1:0] l_d;
  logic                       lfp_busy;

  lfp_filter u_lfp (.clk, .rst_n, .in_valid(x_v), .in_ch(x_ch), .in_data(x_d),
                    .out_valid(l_v), .out_ch(l_ch), .out_data(l_d));
  frame_encoder u_enc_lfp (.clk, .rst_n, .in_valid(l_v), .in_ch(l_ch), .in_data(l_d),
                           .sout(lfp_sout), .busy(lfp_busy));

  // band-pass filter and its coefficient port
  logic        c_we;
  logic [4:0]  c_addr;
  logic [19:0] c_data;
  logic                       b_v;
  logic [CH_W-1:0]            b_ch;
  logic signed [SAMPLE_W-1:0] b_d;
  logic                       bpf_busy;

  spi_slave u_spi (.clk, .rst_n, .spi_sclk, .spi_cs_n, .spi_mosi,
                   .wr_en(c_we), .wr_addr(c_addr), .wr_data(c_data));
  bandpass_filter u_bpf (.clk, .rst_n, .coef_we(c_we), .coef_addr(c_addr), .coef_data(c_data),
                         .in_valid(x_v), .in_ch(x_ch), .in_data(x_d),
                         .out_valid(b_v), .out_ch(b_ch), .out_data(b_d));
  frame_encoder u_enc_bpf (.clk, .rst_n, .in_valid(b_v), .in_ch(b_ch), .in_data(b_d),
                           .sout(bpf_sout), .busy(bpf_busy));

  // Hilbert transform and normalisation
  logic                h_v;
  logic [CH_W-1:0]     h_ch;
  logic signed [20:0]  h_re, h_im;
  logic [41:0]         h_z;
  logic                n_v;
  logic [CH_W-1:0]     n_ch;
  logic [15:0]         n_zn;

  hilbert_transform u_hil (.clk, .rst_n, .in_valid(b_v), .in_ch(b_ch), .in_data(b_d),
                           .out_valid(h_v), .out_ch(h_ch), .out_re(h_re), .out_im(h_im),
                           .out_z(h_z));
  variance_normalizer u_norm (.clk, .rst_n, .in_valid(h_v), .in_ch(h_ch), .in_z(h_z),
                              .out_valid(n_v), .out_ch(n_ch), .out_zn(n_zn));

  // regression engines
  logic            par_we   [N_ENG];
  logic [CH_W-1:0] par_ch   [N_ENG];
  ecpc_params_t    par      [N_ENG];
  logic [CH_W-1:0] train_ch [N_ENG];
  logic            fitting  [N_ENG];

  for (genvar e = 0; e < N_ENG; e++) begin : g_eng
    ecpc_regression_engine #(.ENGINE_ID(e), .T_TRAIN(T_TRAIN)) u_eng (
      .clk, .rst_n, .in_valid(n_v), .in_ch(n_ch), .in_zn(n_zn),
      .par_we(par_we[e]), .par_ch(par_ch[e]), .par(par[e]),
      .train_ch(train_ch[e]), .fitting(fitting[e]));
  end

  // probability map
  logic            p_v;
  logic [CH_W-1:0] p_ch;
  logic [15:0]     p_s;
  logic            w_v;
  logic [CH_W-1:0] w_ch;
  logic [15:0]     w_s;
  logic            prob_busy;

  probability_estimator u_prob (.clk, .rst_n, .par_we, .par_ch, .par,
                                .in_valid(n_v), .in_ch(n_ch), .in_zn(n_zn),
                                .p_valid(p_v), .p_ch(p_ch), .p_score(p_s),
                                .win_valid(w_v), .win_ch(w_ch), .win_score(w_s),
                                .ch_trained(trained));
  frame_encoder u_enc_prob (.clk, .rst_n, .in_valid(w_v), .in_ch(w_ch), .in_data(w_s),
                            .sout(prob_sout), .busy(prob_busy));

endmodule
