// EC-PC regression engine: histogram training and line fitting for the four
// channels it serves.
//
// Four engines share the 16 channels; engine ENGINE_ID serves channels
// 4*ENGINE_ID .. 4*ENGINE_ID+3 one after another. For the channel in training
// it counts T_TRAIN normalised samples Zn into a histogram of bin width 0.25:
// 4 EC bins of 14 bits covering Zn = 0..1 and 32 PC bins of 10 bits starting
// at bin PC_FIRST_BIN (Zn = 12..20 by default). Counters saturate. When the
// training period ends, the curve-fitting unit reads the 36 bins one per
// clock, takes y = log2(count) (Mitchell, Q8; an empty bin gives 0) and fits
// two least-squares lines:
//   EC, linear-log:  y = a_ec + b_ec * Zn       over the 4 EC bin centres
//   PC, log-log:     y = a_pc + b_pc * log2 Zn  over the 32 PC bin centres
// The slope is sum_k W_k * y_k with weights W_k = (x_k - mean x) / Sxx that are
// computed at elaboration from the bin centres; the intercept is
// mean(y) - slope * mean(x). The result is written to the probability
// estimator (par_we/par_ch/par), the histogram is cleared and the next channel
// is trained; each channel therefore keeps its parameters for 3*T_TRAIN.
//
// The bin counts and widths, the 4-channel sharing, the 2.5 s training
// period (T_TRAIN = 100000 samples at 40 kHz) and the two regressions follow
// the detector's specification. The position of the PC bins, the fixed-point
// formats and the log2 approximation are this design's choices. A sample of
// the next channel that arrives during the 40-clock fit is not counted.
module ecpc_regression_engine
  import ecpc_pkg::*;
#(
  parameter int ENGINE_ID    = 0,
  parameter int T_TRAIN      = 100000,  // training samples per channel
  parameter int N_EC         = 4,       // EC bins
  parameter int N_PC         = 32,      // PC bins
  parameter int EC_W         = 14,      // EC bin width in bits
  parameter int PC_W         = 10,      // PC bin width in bits
  parameter int PC_FIRST_BIN = 48       // first PC bin (Zn = 12.0)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [CH_W-1:0]    in_ch,
  input  logic [15:0]        in_zn,      // Q8.8
  output logic               par_we,
  output logic [CH_W-1:0]    par_ch,
  output ecpc_params_t       par,
  output logic [CH_W-1:0]    train_ch,   // channel now in training
  output logic               fitting
);

  localparam int N_BIN = N_EC + N_PC;
  localparam int BW    = 1 << (ZN_F - 2);     // bin width 0.25 in Q8
  localparam int CNT_W = $clog2(T_TRAIN + 1);

  // ---- elaboration-time regression constants ---------------------------
  function automatic longint ec_x(input int k);      // bin centre, Q8
    return longint'((2 * k + 1) * BW / 2);
  endfunction
  function automatic longint pc_x(input int k);      // log2 of bin centre, Q8
    return longint'(log2_fx(52'((PC_FIRST_BIN + k) * BW + BW / 2)) - (ZN_F << LOG_F));
  endfunction
  function automatic longint weight(input bit is_pc, input int k);   // Q24
    longint sx, sxx, xk, n;
    n  = is_pc ? N_PC : N_EC;
    sx = 0; sxx = 0;
    for (int i = 0; i < n; i++) begin
      xk  = is_pc ? pc_x(i) : ec_x(i);
      sx  += xk;
      sxx += xk * xk;
    end
    xk = is_pc ? pc_x(k) : ec_x(k);
    return ((n * xk - sx) * (longint'(1) << 24)) / (n * sxx - sx * sx);
  endfunction
  function automatic longint xmean(input bit is_pc);                 // Q8
    longint sx;
    sx = 0;
    for (int i = 0; i < (is_pc ? N_PC : N_EC); i++) sx += is_pc ? pc_x(i) : ec_x(i);
    return sx / (is_pc ? N_PC : N_EC);
  endfunction

  localparam longint XM_EC = xmean(1'b0);
  localparam longint XM_PC = xmean(1'b1);

  logic signed [31:0] w_tab [N_BIN];
  for (genvar g = 0; g < N_BIN; g++) begin : g_w
    localparam longint WV = (g < N_EC) ? weight(1'b0, g) : weight(1'b1, g - N_EC);
    assign w_tab[g] = 32'(WV);
  end

  // ---- histogram -------------------------------------------------------
  logic [EC_W-1:0] ec_bin [N_EC];
  logic [PC_W-1:0] pc_bin [N_PC];

  typedef enum logic [1:0] {S_TRAIN, S_FIT, S_DONE} state_t;
  state_t state;

  logic [1:0]       local_ch;
  logic [CNT_W-1:0] n_samp;
  logic [5:0]       idx;
  logic signed [47:0] sw_ec, sw_pc;   // sum W*y
  logic signed [31:0] sy_ec, sy_pc;   // sum y
  logic [9:0]       bin;
  logic             hit;

  assign train_ch = CH_W'(ENGINE_ID * 4) + CH_W'(local_ch);
  assign fitting  = (state != S_TRAIN);
  assign bin      = in_zn[15:ZN_F-2];
  assign hit      = in_valid && in_ch == train_ch && state == S_TRAIN;

  // y of the bin being read
  logic [51:0] cnt_rd;
  int          y_rd;
  always_comb begin
    if (int'(idx) < N_EC) cnt_rd = 52'(ec_bin[idx[1:0]]);
    else                  cnt_rd = 52'(pc_bin[5'(int'(idx) - N_EC)]);
    y_rd = log2_fx(cnt_rd);
  end

  // final line parameters
  function automatic logic signed [15:0] sat16(input longint v);
    if (v > 32767)  return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return 16'(v);
  endfunction

  logic signed [63:0] b_ec_l, b_pc_l, a_ec_l, a_pc_l;
  always_comb begin
    b_ec_l = longint'(sw_ec) >>> 16;
    b_pc_l = longint'(sw_pc) >>> 16;
    a_ec_l = longint'(sy_ec) / N_EC - ((b_ec_l * XM_EC) >>> LOG_F);
    a_pc_l = longint'(sy_pc) / N_PC - ((b_pc_l * XM_PC) >>> LOG_F);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_EC; i++) ec_bin[i] <= '0;
      for (int i = 0; i < N_PC; i++) pc_bin[i] <= '0;
      state    <= S_TRAIN;
      local_ch <= '0;
      n_samp   <= '0;
      idx      <= '0;
      sw_ec    <= '0;
      sw_pc    <= '0;
      sy_ec    <= '0;
      sy_pc    <= '0;
      par_we   <= 1'b0;
      par_ch   <= '0;
      par      <= '0;
    end else begin
      par_we <= 1'b0;
      unique case (state)
        S_TRAIN: begin
          if (hit) begin
            if (int'(bin) < N_EC) begin
              if (ec_bin[bin[1:0]] != '1) ec_bin[bin[1:0]] <= ec_bin[bin[1:0]] + 1'b1;
            end else if (int'(bin) >= PC_FIRST_BIN && int'(bin) < PC_FIRST_BIN + N_PC) begin
              if (pc_bin[5'(int'(bin) - PC_FIRST_BIN)] != '1)
                pc_bin[5'(int'(bin) - PC_FIRST_BIN)] <= pc_bin[5'(int'(bin) - PC_FIRST_BIN)] + 1'b1;
            end
            if (int'(n_samp) == T_TRAIN - 1) begin
              n_samp <= '0;
              state  <= S_FIT;
              idx    <= '0;
              sw_ec  <= '0;
              sw_pc  <= '0;
              sy_ec  <= '0;
              sy_pc  <= '0;
            end else begin
              n_samp <= n_samp + 1'b1;
            end
          end
        end
        S_FIT: begin
          if (int'(idx) < N_EC) begin
            sw_ec <= sw_ec + 48'(w_tab[idx]) * 48'(y_rd);
            sy_ec <= sy_ec + 32'(y_rd);
          end else begin
            sw_pc <= sw_pc + 48'(w_tab[idx]) * 48'(y_rd);
            sy_pc <= sy_pc + 32'(y_rd);
          end
          if (int'(idx) == N_BIN - 1) state <= S_DONE;
          else idx <= idx + 6'd1;
        end
        S_DONE: begin
          par_we   <= 1'b1;
          par_ch   <= train_ch;
          par.a_ec <= sat16(a_ec_l);
          par.b_ec <= sat16(b_ec_l);
          par.a_pc <= sat16(a_pc_l);
          par.b_pc <= sat16(b_pc_l);
          for (int i = 0; i < N_EC; i++) ec_bin[i] <= '0;
          for (int i = 0; i < N_PC; i++) pc_bin[i] <= '0;
          local_ch <= local_ch + 2'd1;
          state    <= S_TRAIN;
        end
        default: state <= S_TRAIN;
      endcase
    end
  end

endmodule
