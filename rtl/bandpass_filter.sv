// Programmable band-pass filter: a 16th-order elliptic IIR filter in cascade
// form, eight biquads, time-shared by the 16 channels.
//
// Each biquad has three coefficients and the cascade one overall gain, 25
// programmable coefficients of 20 bits (Q2.18) with 40-bit intermediate data
// (Q22.18), as the detector's specification gives them. Every section has its
// zeros on the unit circle, as an elliptic band-pass design has:
//   H_k(z) = (1 + b1_k z^-1 + z^-2) / (1 + a1_k z^-1 + a2_k z^-2)
// and is computed in direct form II:
//   w  = s - a1*w1 - a2*w2 ;  s' = w + b1*w1 + w2 ;  w2 <= w1 ; w1 <= w
// with the gain applied to the input. These forms and formats are this
// design's choice. The reset coefficients are a 300 Hz - 8 kHz elliptic
// design (0.08 dB ripple, 64 dB stop band, fs = 40 kHz), the default band of
// the specification.
//
// Coefficient map: address 3k = b1 of section k, 3k+1 = a1, 3k+2 = a2
// (k = 0..7), address 24 = gain. Writes to other addresses are ignored.
//
// Timing: one section per clock. A sample is accepted when in_valid is high
// (the filter must be idle, i.e. samples at least 10 clocks apart); the
// result leaves 10 clocks later on out_valid, saturated to 16 bits.
module bandpass_filter
  import ecpc_pkg::*;
#(
  parameter int N_SEC  = 8,   // biquad sections
  parameter int COEF_W = 20,  // coefficient width, Q2.18
  parameter int ACC_W  = 40   // intermediate data width, Q22.18
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       coef_we,
  input  logic [4:0]                 coef_addr,
  input  logic [COEF_W-1:0]          coef_data,
  input  logic                       in_valid,
  input  logic [CH_W-1:0]            in_ch,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic signed [SAMPLE_W-1:0] out_data
);

  localparam int FRAC = COEF_W - 2;
  localparam int SEC_W = $clog2(N_SEC + 1);

  // Default coefficients (Q2.18), sections 0..7: b1, a1, a2
  localparam int DEF_B1 [8] = '{443610, 143085, -9386, -524262, -60735, -524112, -523969, -523900};
  localparam int DEF_A1 [8] = '{-275707, -208884, -164795, -486854, -147565, -513443, -520447, -522954};
  localparam int DEF_A2 [8] = '{93619, 148447, 207378, 226967, 246489, 252224, 258939, 261367};
  localparam int DEF_G      = 2539;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  coef_t b1 [N_SEC];
  coef_t a1 [N_SEC];
  coef_t a2 [N_SEC];
  coef_t gain;

  acc_t w1 [N_CH*N_SEC];
  acc_t w2 [N_CH*N_SEC];

  logic             busy;
  logic [SEC_W-1:0] sec;
  logic [CH_W-1:0]  ch;
  acc_t             s;

  // One biquad section, combinational
  localparam int PW = ACC_W + COEF_W;
  int   idx;
  acc_t w_new, y_sec, s_in;
  logic signed [PW-1:0] p_a1, p_a2, p_b1;

  always_comb begin
    idx   = int'(ch) * N_SEC + int'(sec);
    p_a1  = PW'(a1[sec]) * PW'(w1[idx]);
    p_a2  = PW'(a2[sec]) * PW'(w2[idx]);
    p_b1  = PW'(b1[sec]) * PW'(w1[idx]);
    w_new = s - acc_t'(p_a1 >>> FRAC) - acc_t'(p_a2 >>> FRAC);
    y_sec = w_new + acc_t'(p_b1 >>> FRAC) + w2[idx];
    s_in  = acc_t'(PW'(gain) * PW'(in_data));
  end

  function automatic logic signed [SAMPLE_W-1:0] sat16(input acc_t v);
    acc_t q;
    q = v >>> FRAC;
    if (q > acc_t'(32767))  return 16'sd32767;
    if (q < acc_t'(-32768)) return -16'sd32768;
    return q[SAMPLE_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_SEC; k++) begin
        b1[k] <= coef_t'(DEF_B1[k % 8]);
        a1[k] <= coef_t'(DEF_A1[k % 8]);
        a2[k] <= coef_t'(DEF_A2[k % 8]);
      end
      gain <= coef_t'(DEF_G);
      for (int i = 0; i < N_CH*N_SEC; i++) begin
        w1[i] <= '0;
        w2[i] <= '0;
      end
      busy      <= 1'b0;
      sec       <= '0;
      ch        <= '0;
      s         <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (coef_we) begin
        for (int k = 0; k < N_SEC; k++) begin
          if (int'(coef_addr) == 3*k)     b1[k] <= coef_data;
          if (int'(coef_addr) == 3*k + 1) a1[k] <= coef_data;
          if (int'(coef_addr) == 3*k + 2) a2[k] <= coef_data;
        end
        if (int'(coef_addr) == 3*N_SEC) gain <= coef_data;
      end
      if (!busy) begin
        if (in_valid) begin
          busy <= 1'b1;
          sec  <= '0;
          ch   <= in_ch;
          s    <= s_in;
        end
      end else if (int'(sec) < N_SEC) begin
        w2[idx] <= w1[idx];
        w1[idx] <= w_new;
        s       <= y_sec;
        sec     <= sec + 1'b1;
      end else begin
        busy      <= 1'b0;
        out_valid <= 1'b1;
        out_ch    <= ch;
        out_data  <= sat16(s);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("bandpass_filter: sample arrived while busy");

endmodule
