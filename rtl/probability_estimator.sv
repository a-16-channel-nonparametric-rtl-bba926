// Spiking-probability estimator with winner-take-all output reduction.
//
// For every normalised sample Zn of a channel whose parameters have been
// trained, it evaluates the two fitted components in the log2 domain,
//   Ln = a_ec + b_ec * Zn             (log2 of the noise density f_n)
//   Ld = a_pc + b_pc * log2(Zn)       (log2 of the spike density f_d)
// and the spiking probability p = f_d / (f_d + f_n) = 1 / (1 + 2^(Ln-Ld)),
// as an unsigned Q0.16 score (65535 = certain spike). 2^-u is formed from the
// integer part by a shift and from the fraction f by 1 - f/2; the final
// quotient comes from a 16-step restoring divider. Channels without
// parameters, and Zn = 0, score 0. These number formats and approximations are
// this design's choice; the probability formula is the detector's.
//
// Winner-take-all: for each channel the highest score of each window of
// WTA_LEN consecutive samples is kept and emitted at the window's last
// sample, a 64-fold reduction of the output rate. Windows do not overlap
// and only the score is reported.
//
// Parameters are written by the N_ENG regression engines through one write
// port each. Timing: p_valid/p_score one clock after in_valid; win_valid in
// the same clock for the last sample of a window. All channels must arrive in
// the order 0..N_CH-1.
module probability_estimator
  import ecpc_pkg::*;
#(
  parameter int WTA_LEN = 64   // samples per winner-take-all window
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               par_we [N_ENG],
  input  logic [CH_W-1:0]    par_ch [N_ENG],
  input  ecpc_params_t       par    [N_ENG],
  input  logic               in_valid,
  input  logic [CH_W-1:0]    in_ch,
  input  logic [15:0]        in_zn,        // Q8.8
  output logic               p_valid,
  output logic [CH_W-1:0]    p_ch,
  output logic [15:0]        p_score,      // Q0.16
  output logic               win_valid,
  output logic [CH_W-1:0]    win_ch,
  output logic [15:0]        win_score,
  output logic [N_CH-1:0]    ch_trained
);

  localparam int WW = $clog2(WTA_LEN);

  ecpc_params_t     ptab [N_CH];
  logic [15:0]      wmax [N_CH];
  logic [WW-1:0]    wpos;

  ecpc_params_t     pc;
  logic signed [63:0] lzn, ln_n, ln_d, dd, u, t;
  logic [15:0]      p;
  logic [15:0]      wcur;

  function automatic logic [15:0] div_q16(input longint num, input longint den);
    // floor(num * 2^16 / den) for 0 <= num <= den, saturated to 16 bits
    longint rem, q;
    rem = num;
    q   = 0;
    for (int i = 15; i >= 0; i--) begin
      rem = rem << 1;
      if (rem >= den) begin
        rem = rem - den;
        q   = q | (longint'(1) << i);
      end
    end
    if (num >= den) return 16'hFFFF;
    return 16'(q);
  endfunction

  always_comb begin
    pc   = ptab[in_ch];
    lzn  = longint'(log2_fx(52'(in_zn))) - longint'(ZN_F << LOG_F);
    ln_n = longint'(pc.a_ec) + ((longint'(pc.b_ec) * longint'(in_zn)) >>> ZN_F);
    ln_d = longint'(pc.a_pc) + ((longint'(pc.b_pc) * lzn) >>> LOG_F);
    dd   = ln_n - ln_d;
    u    = (dd < 0) ? -dd : dd;
    t    = (longint'(65536) - (u & 255) * 128) >>> (u >>> LOG_F);   // 2^-u, Q16
    if (!ch_trained[in_ch] || in_zn == '0) p = '0;
    else if (dd >= longint'(16 << LOG_F))  p = '0;
    else if (dd <= -longint'(16 << LOG_F)) p = 16'hFFFF;
    else if (dd >= 0)                      p = div_q16(t, 65536 + t);
    else                                   p = div_q16(65536, 65536 + t);
    wcur = (wpos == '0 || p > wmax[in_ch]) ? p : wmax[in_ch];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        ptab[c] <= '0;
        wmax[c] <= '0;
      end
      ch_trained <= '0;
      wpos       <= '0;
      p_valid    <= 1'b0;
      p_ch       <= '0;
      p_score    <= '0;
      win_valid  <= 1'b0;
      win_ch     <= '0;
      win_score  <= '0;
    end else begin
      for (int e = 0; e < N_ENG; e++) begin
        if (par_we[e]) begin
          ptab[par_ch[e]]       <= par[e];
          ch_trained[par_ch[e]] <= 1'b1;
        end
      end
      p_valid   <= in_valid;
      win_valid <= 1'b0;
      if (in_valid) begin
        p_ch        <= in_ch;
        p_score     <= p;
        wmax[in_ch] <= wcur;
        if (int'(wpos) == WTA_LEN - 1) begin
          win_valid <= 1'b1;
          win_ch    <= in_ch;
          win_score <= wcur;
        end
        if (int'(in_ch) == N_CH - 1) wpos <= wpos + 1'b1;
      end
    end
  end

endmodule
