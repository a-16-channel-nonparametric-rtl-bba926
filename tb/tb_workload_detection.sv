// Detection workload for ecpc_top: true- and false-positive rates of the
// probability map against spike SNR, with a shortened training period
// (T_TRAIN = 4096 samples, so all 16 channels hold parameters after 16384
// samples; the chip default is 100000).
//
// Channel c carries Gaussian-like noise (sum of four uniforms, std 346 LSB),
// a slow field potential and biphasic spikes at random times. The spike SNR
// is set per group of four channels, c/4 -> 0, 2.5, 5 and 10 dB, where SNR
// is the spike peak amplitude over three noise standard deviations (both on
// the raw samples, 20*log10 of the ratio). The mean firing rate is set by
// c%4 -> 30, 50, 70 and 110 Hz, with a 2 ms refractory gap.
//
// The probability stream is deframed and scored from sample 20000 on. A
// spike counts as detected when a 64-sample window that holds part of it
// scores at or above the threshold; a window with no spike near it that does
// so is a false positive. As in the usual detector comparison, thresholds are
// swept (0.5, 0.75, ... up to 65535/65536) and the one with the largest
// TPR - FPR is kept per SNR group; TPR/FPR at p >= 0.5 are printed too, as
// are the parameters each engine writes. Checks: every window arrives, all
// channels are trained, at 10 dB TPR >= 0.8 with FPR <= 0.1, and TPR - FPR
// at 10 dB is not below that at 0 dB.
module tb_workload_detection;
  import ecpc_pkg::*;

  localparam int TT = 4096;
  localparam int NSAMP = 40000;
  localparam int EVAL0 = 20000;

  logic clk = 0, rst_n = 0, sin = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic lfp_sout, bpf_sout, prob_sout;
  logic [15:0] trained;
  logic frame_err;
  int checks = 0, failures = 0;

  ecpc_top #(.T_TRAIN(TT)) dut (.*);

  always #5 clk = ~clk;

  int  xin [16][NSAMP];
  bit  spk [16][NSAMP];
  real pi = 3.14159265358979;
  real snr_db [4] = '{0.0, 2.5, 5.0, 10.0};
  int  rate [4] = '{30, 50, 70, 110};

  function automatic real tmpl(input int k);   // unit-peak spike shape
    if (k < 8)  return -$sin(pi * k / 8.0);
    if (k < 24) return 0.5 * $sin(pi * (k - 8) / 16.0);
    return 0.0;
  endfunction

  // ---------------- probability deframer ----------------------------------
  logic [31:0] sr = 0;
  int fcnt = -1, fch = 0;
  int score [16][NSAMP / 64];
  int nwin [16];

  always @(posedge clk) if (rst_n) begin
    sr = {sr[30:0], prob_sout};
    if (fcnt < 0) begin
      if (sr[7:0] == HDR_FIRST) begin fcnt = 0; fch = 0; end
      else if (sr[7:0] == HDR_OTHER) begin fcnt = 0; fch = fch + 1; end
    end else begin
      fcnt++;
      if (fcnt == 24) begin
        fcnt = -1;
        if (nwin[fch] < NSAMP / 64)
          score[fch][nwin[fch]] = int'({sr[23:18], sr[15:10], sr[7:4]});
        nwin[fch]++;
      end
    end
  end

  always @(posedge clk) for (int e = 0; e < N_ENG; e++)
    if (dut.par_we[e])
      $display("params ch%0d: a_ec %0.2f b_ec %0.3f a_pc %0.2f b_pc %0.3f", dut.par_ch[e],
               dut.par[e].a_ec / 256.0, dut.par[e].b_ec / 256.0, dut.par[e].a_pc / 256.0, dut.par[e].b_pc / 256.0);

  // Window w of the map covers input samples 64w-30 .. 64w+33 (Hilbert delay).
  function automatic int win_of(input int n);
    return (n + 30) / 64;
  endfunction

  function automatic bit near_spike(input int c, input int w);
    for (int g = 64 * w - 30 - 24; g < 64 * w + 34 + 8; g++)
      if (g >= 0 && g < NSAMP && spk[c][g]) return 1;
    return 0;
  endfunction

  initial begin
    logic [31:0] f;
    int tp1, np1, fp1, nn1, thr;
    int n, g, gap, w0, w1;
    int best_thr [4];
    real amp;
    real tpr [4], fpr [4], best_d [4], tpr50 [4], fpr50 [4];
    for (int c = 0; c < 16; c++) begin
      nwin[c] = 0;
      for (n = 0; n < NSAMP; n++) begin
        spk[c][n] = 0;
        xin[c][n] = int'(1500.0 * $sin(2.0 * pi * 8.0 * n / 40000.0 + c))
                  + int'($urandom_range(0, 600)) + int'($urandom_range(0, 600))
                  + int'($urandom_range(0, 600)) + int'($urandom_range(0, 600)) - 1200;
      end
      amp = 3.0 * 346.0 * (10.0 ** (snr_db[c / 4] / 20.0));
      gap = 40000 / rate[c % 4];                    // mean interval in samples
      n = int'($urandom_range(20, gap));
      while (n < NSAMP - 30) begin
        spk[c][n] = 1;
        for (int k = 0; k < 24; k++) xin[c][n + k] += int'(amp * tmpl(k));
        n += 80 + int'($urandom_range(0, 2 * (gap - 80)));
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (n = 0; n < NSAMP; n++)
      for (int c = 0; c < 16; c++) begin
        f = pack_frame(c == 0, 16'(xin[c][n]));
        for (int i = 31; i >= 0; i--) begin
          @(negedge clk);
          sin = f[i];
        end
      end
    repeat (2000) @(negedge clk);

    // threshold sweep, as in the detector comparison: per SNR group keep the
    // threshold with the largest TPR - FPR
    for (g = 0; g < 4; g++) begin
      best_d[g] = -2.0;
      for (int t = 0; t < 16; t++) begin
        thr = (t == 15) ? 65535 : 65536 - (32768 >> t);
        tp1 = 0; np1 = 0; fp1 = 0; nn1 = 0;
        for (int c = 4 * g; c < 4 * g + 4; c++) begin
          for (n = EVAL0; n < NSAMP - 100; n++) if (spk[c][n]) begin
            w0 = win_of(n);
            w1 = win_of(n + 23);
            np1++;
            if (score[c][w0] >= thr || score[c][w1] >= thr) tp1++;
          end
          for (int w = (EVAL0 + 64) / 64; w < (NSAMP - 100) / 64; w++)
            if (!near_spike(c, w)) begin
              nn1++;
              if (score[c][w] >= thr) fp1++;
            end
        end
        if (t == 0) begin tpr50[g] = real'(tp1) / np1; fpr50[g] = real'(fp1) / nn1; end
        if (real'(tp1) / np1 - real'(fp1) / nn1 > best_d[g]) begin
          best_d[g] = real'(tp1) / np1 - real'(fp1) / nn1;
          tpr[g] = real'(tp1) / np1;
          fpr[g] = real'(fp1) / nn1;
          best_thr[g] = thr;
        end
      end
      $display("SNR %4.1f dB: p>=0.5 TPR %0.3f FPR %0.3f | best threshold %0.4f TPR %0.3f FPR %0.3f",
               snr_db[g], tpr50[g], fpr50[g], best_thr[g] / 65536.0, tpr[g], fpr[g]);
    end

    for (int c = 0; c < 16; c++) begin
      checks++;
      if (nwin[c] != NSAMP / 64) begin failures++; $display("ch%0d windows %0d", c, nwin[c]); end
    end
    checks++; if (trained != 16'hFFFF) begin failures++; $display("trained %h", trained); end
    checks++; if (tpr[3] < 0.8) begin failures++; $display("TPR at 10 dB too low"); end
    checks++; if (fpr[3] > 0.1) begin failures++; $display("FPR at 10 dB too high"); end
    checks++; if (best_d[3] < best_d[0]) begin failures++; $display("separation falls with SNR"); end
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
