// End-to-end testbench of ecpc_top with a shortened training period
// (T_TRAIN = 1024 samples per channel).
//
// Sixteen channels of synthetic data (slow 10 Hz field potential, broadband
// noise and biphasic spikes at random times) are framed and sent serially,
// after one SPI write that changes the band-pass gain. The three output
// streams are deframed here and checked:
//   band-pass stream  bit-exact against a 64-bit model of the biquad cascade
//                     (with the gain written over SPI), channel order 0..15;
//   LFP stream        against a floating-point first-order low-pass, 2 LSB;
//   probability map   one score per channel per 64 samples; 0 until the
//                     channel is trained; after training, windows holding a
//                     spike score higher on average than windows without.
// Mechanisms counted (each must occur): both header types, SPI coefficient
// write, training of every channel, retraining of a channel (second round
// of an engine), winner-take-all windows, nonzero scores.
module tb_ecpc_top;
  import ecpc_pkg::*;

  localparam int TT = 1024;
  localparam int NSAMP = 6 * TT + 256;

  logic clk = 0, rst_n = 0, sin = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic lfp_sout, bpf_sout, prob_sout;
  logic [15:0] trained;
  logic frame_err;
  int checks = 0, failures = 0;

  ecpc_top #(.T_TRAIN(TT)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- stimulus -----------------------------------------
  int  xin [16][NSAMP];
  bit  spk [16][NSAMP];
  real pi = 3.14159265358979;

  function automatic int tmpl(input int k, input int a);   // spike shape
    if (k < 8)  return int'(-a * $sin(pi * k / 8.0));
    if (k < 24) return int'(0.5 * a * $sin(pi * (k - 8) / 16.0));
    return 0;
  endfunction

  // ---------------- reference models ------------------------------------
  longint rb1 [8] = '{443610, 143085, -9386, -524262, -60735, -524112, -523969, -523900};
  longint ra1 [8] = '{-275707, -208884, -164795, -486854, -147565, -513443, -520447, -522954};
  longint ra2 [8] = '{93619, 148447, 207378, 226967, 246489, 252224, 258939, 261367};
  localparam longint NEW_GAIN = 2600;
  longint s1 [16][8];
  longint s2 [16][8];
  real    ylfp [16];

  function automatic longint wrap40(input longint v);
    return (v <<< 24) >>> 24;
  endfunction

  function automatic int bpf_model(input int c, input int x);
    longint s, w, q;
    s = wrap40(NEW_GAIN * x);
    for (int k = 0; k < 8; k++) begin
      w = wrap40(s - ((ra1[k] * s1[c][k]) >>> 18) - ((ra2[k] * s2[c][k]) >>> 18));
      s = wrap40(w + ((rb1[k] * s1[c][k]) >>> 18) + s2[c][k]);
      s2[c][k] = s1[c][k];
      s1[c][k] = w;
    end
    q = s >>> 18;
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return int'(q);
  endfunction

  // ---------------- output deframers ------------------------------------
  typedef struct { int ch; int d; } smp_t;
  smp_t lfp_q [$];
  smp_t bpf_q [$];
  smp_t prob_q [$];
  int   n_hdr_first = 0, n_hdr_other = 0;

  class deframer;
    logic [31:0] sr = 0;
    int cnt = -1, ch = 0;
    function automatic bit push(input logic b, output smp_t s);
      sr = {sr[30:0], b};
      if (cnt < 0) begin
        if (sr[7:0] == 8'b10101011) begin cnt = 0; ch = 0; n_hdr_first++; end
        else if (sr[7:0] == 8'b10111101) begin cnt = 0; ch = ch + 1; n_hdr_other++; end
        return 0;
      end
      cnt++;
      if (cnt == 24) begin
        cnt = -1;
        s.ch = ch;
        s.d = int'($signed({sr[23:18], sr[15:10], sr[7:4]}));
        return 1;
      end
      return 0;
    endfunction
  endclass

  deframer df_l = new(), df_b = new(), df_p = new();

  always @(posedge clk) if (rst_n) begin
    smp_t s;
    if (df_l.push(lfp_sout, s))  lfp_q.push_back(s);
    if (df_b.push(bpf_sout, s))  bpf_q.push_back(s);
    if (df_p.push(prob_sout, s)) begin s.d = s.d & 16'hFFFF; prob_q.push_back(s); end
  end

  // ---------------- mechanism counters ------------------------------------
  int n_spi = 0, n_par = 0, n_retrain = 0, n_windows = 0, n_nonzero = 0;
  bit seen_par [16];
  always @(posedge clk) if (rst_n) begin
    if (dut.c_we) n_spi++;
    for (int e = 0; e < N_ENG; e++) if (dut.par_we[e]) begin
      n_par++;
      if (seen_par[dut.par_ch[e]]) n_retrain++;
      seen_par[dut.par_ch[e]] = 1;
    end
  end

  task automatic spi_write(input logic [4:0] a, input logic [19:0] d);
    logic [31:0] w;
    w = {3'b0, a, 4'b0, d};
    spi_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 31; i >= 0; i--) begin
      spi_mosi = w[i];
      repeat (4) @(negedge clk);
      spi_sclk = 1;
      repeat (4) @(negedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(negedge clk);
    spi_cs_n = 1;
  endtask

  // windows: sample indices covered by probability window w (Hilbert delay 30)
  function automatic bit window_has_spike(input int c, input int w);
    for (int g = 64 * w - 30 - 20; g < 64 * w + 34 - 4; g++)
      if (g >= 0 && g < NSAMP && spk[c][g]) return 1;
    return 0;
  endfunction

  initial begin
    logic [31:0] f;
    int n_b = 0, n_l = 0, e, win, next_spike;
    real sum_s = 0, sum_n = 0;
    int  cnt_s = 0, cnt_n = 0;
    int  pw [16];
    for (int c = 0; c < 16; c++) begin
      ylfp[c] = 0.0; pw[c] = 0; seen_par[c] = 0;
      for (int k = 0; k < 8; k++) begin s1[c][k] = 0; s2[c][k] = 0; end
      next_spike = int'($urandom_range(50, 400));
      for (int n = 0; n < NSAMP; n++) begin
        spk[c][n] = 0;
        xin[c][n] = int'(2000.0 * $sin(2.0 * pi * 10.0 * n / 40000.0 + c))
                  + int'($urandom_range(0, 600)) + int'($urandom_range(0, 600))
                  + int'($urandom_range(0, 600)) + int'($urandom_range(0, 600)) - 1200;
      end
      for (int n = next_spike; n < NSAMP - 30; n += int'($urandom_range(150, 500))) begin
        spk[c][n] = 1;
        for (int k = 0; k < 24; k++) xin[c][n + k] += tmpl(k, 4000);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    spi_write(5'd24, 20'(NEW_GAIN));
    repeat (10) @(negedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      for (int c = 0; c < 16; c++) begin
        f = {c == 0 ? 8'b10101011 : 8'b10111101, 24'h0};
        for (int i = 0; i < 16; i++) f[23 - i - 2 * (i / 6)] = 1'(xin[c][n] >>> (15 - i));
        for (int i = 31; i >= 0; i--) begin
          @(negedge clk);
          sin = f[i];
        end
      end
      // check everything decoded so far
      while (bpf_q.size() > 0) begin
        smp_t s;
        s = bpf_q.pop_front();
        e = bpf_model(n_b % 16, xin[n_b % 16][n_b / 16]);
        checks++;
        if (s.ch != n_b % 16 || s.d != e) begin
          failures++;
          if (failures < 10) $display("bpf %0d: ch%0d got %0d expected ch%0d %0d", n_b, s.ch, s.d, n_b % 16, e);
        end
        n_b++;
      end
      while (lfp_q.size() > 0) begin
        smp_t s;
        int c;
        s = lfp_q.pop_front();
        c = n_l % 16;
        ylfp[c] = ylfp[c] + (2524.0 / 65536.0) * (real'(xin[c][n_l / 16]) - ylfp[c]);
        e = int'($floor(ylfp[c]));
        checks++;
        if (s.ch != c || s.d - e > 2 || e - s.d > 2) begin
          failures++;
          if (failures < 10) $display("lfp %0d: got %0d expected %0d", n_l, s.d, e);
        end
        n_l++;
      end
      while (prob_q.size() > 0) begin
        smp_t s;
        s = prob_q.pop_front();
        n_windows++;
        win = pw[s.ch]++;
        if (s.d != 0) n_nonzero++;
        // channel c is first trained after (c%4 + 1) * TT samples (+ Hilbert delay)
        if ((win + 1) * 64 < ((s.ch % 4) + 1) * TT) begin
          checks++;
          if (s.d != 0) begin failures++; $display("untrained ch%0d scored %0d", s.ch, s.d); end
        end else if ((win - 2) * 64 > 4 * TT) begin
          if (window_has_spike(s.ch, win)) begin sum_s += s.d; cnt_s++; end
          else begin sum_n += s.d; cnt_n++; end
        end
      end
    end
    repeat (600) @(negedge clk);
    n_windows += prob_q.size();
    $display("bpf %0d lfp %0d windows %0d nonzero %0d par %0d retrain %0d", n_b, n_l, n_windows, n_nonzero, n_par, n_retrain);
    $display("mean score: spike windows %0.0f (%0d), other windows %0.0f (%0d)",
             cnt_s ? sum_s / cnt_s : 0, cnt_s, cnt_n ? sum_n / cnt_n : 0, cnt_n);
    checks++;
    if (n_b < 16 * (NSAMP - 1)) begin failures++; $display("bpf samples missing"); end
    checks++;
    if (n_windows != 16 * (NSAMP / 64)) begin failures++; $display("window count wrong"); end
    checks++;
    if (cnt_s == 0 || cnt_n == 0 || sum_s / cnt_s <= sum_n / cnt_n) begin failures++; $display("spikes not scored higher"); end
    // mechanisms
    checks++; if (n_hdr_first == 0 || n_hdr_other == 0) begin failures++; $display("header type missing"); end
    checks++; if (n_spi != 1) begin failures++; $display("SPI writes %0d", n_spi); end
    checks++; if (trained != 16'hFFFF) begin failures++; $display("trained %h", trained); end
    checks++; if (n_retrain == 0) begin failures++; $display("no retraining"); end
    checks++; if (n_nonzero == 0) begin failures++; $display("no nonzero score"); end
    checks++; if (frame_err) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 512 + 100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
