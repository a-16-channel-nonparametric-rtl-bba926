// Shared constants, types and arithmetic helpers of the 16-channel EC-PC
// spike detector.
//
// The detector runs on one clock of 20.48 MHz. Sixteen channels sampled at
// 40 kHz are time-division multiplexed, so every channel owns a slot of 32
// clocks and every sample period is 512 clocks. Samples travel between blocks
// as a (valid, channel, data) triple that is asserted once per slot.
//
// log2_fx() is the fixed-point base-2 logarithm used by both the regression
// engines and the probability estimator (Mitchell approximation: the position
// of the leading one is the integer part, the following 8 bits are the
// fraction). Using the same function for run-time values and for the
// elaborated bin positions keeps the fitted lines consistent with it.
package ecpc_pkg;

  localparam int N_CH     = 16;   // channels
  localparam int CH_W     = 4;    // channel index width
  localparam int SAMPLE_W = 16;   // raw and output sample width
  localparam int N_ENG    = 4;    // EC-PC regression engines
  localparam int LOG_F    = 8;    // fraction bits of all log2 values
  localparam int ZN_F     = 8;    // fraction bits of normalised Z (Q8.8)

  // Frame headers of the serial streams
  localparam logic [7:0] HDR_FIRST = 8'b1010_1011;  // channel 0
  localparam logic [7:0] HDR_OTHER = 8'b1011_1101;  // channels 1..15

  // Parameters of one channel, all log2 values in signed Q8.8:
  //   log2 f_n(Zn) = a_ec + b_ec * Zn          (exponential component)
  //   log2 f_d(Zn) = a_pc + b_pc * log2(Zn)    (polynomial component)
  typedef struct packed {
    logic signed [15:0] a_ec;
    logic signed [15:0] b_ec;
    logic signed [15:0] a_pc;
    logic signed [15:0] b_pc;
  } ecpc_params_t;

  // 32-bit frame: header, then the 16 data bits in groups of six, each group
  // followed by "00" (the last group of four by "0000").
  function automatic logic [31:0] pack_frame(input logic first, input logic [15:0] d);
    return {first ? HDR_FIRST : HDR_OTHER, d[15:10], 2'b00, d[9:4], 2'b00, d[3:0], 4'b0000};
  endfunction

  // Mitchell log2 in Q.8 of an unsigned value up to 52 bits; log2_fx(0) = 0.
  function automatic int log2_fx(input logic [51:0] x);
    int p;
    logic [51:0] sh;
    p = 0;
    for (int i = 0; i < 52; i++) if (x[i]) p = i;
    sh = x << (51 - p);
    return (p << LOG_F) + int'(sh[50:43]);
  endfunction

  // Twiddle factors W16^k = exp(-2*pi*i*k/16), k = 0..7, in Q1.14
  function automatic logic signed [15:0] tw_re(input int k);
    case (k)
      0: return 16'sd16384;  1: return 16'sd15137;  2: return 16'sd11585;  3: return 16'sd6270;
      4: return 16'sd0;      5: return -16'sd6270;  6: return -16'sd11585; 7: return -16'sd15137;
      default: return 16'sd0;
    endcase
  endfunction

  function automatic logic signed [15:0] tw_im(input int k);
    case (k)
      0: return 16'sd0;       1: return -16'sd6270;  2: return -16'sd11585; 3: return -16'sd15137;
      4: return -16'sd16384;  5: return -16'sd15137; 6: return -16'sd11585; 7: return -16'sd6270;
      default: return 16'sd0;
    endcase
  endfunction

endpackage
