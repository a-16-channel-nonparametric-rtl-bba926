// Adaptation workload for ecpc_top: the spike firing rate steps from 5 Hz to
// 45 Hz and the rate is read back from the probability map. Training is
// shortened to T_TRAIN = 10000 samples (0.25 s), so every channel is trained
// after 1 s and retrained every 1 s; the chip default is 2.5 s and 10 s.
//
// Every channel carries Gaussian-like noise (std 346 LSB), a slow field
// potential and biphasic spikes whose intervals are uniformly distributed
// around the mean rate: 5 Hz for the first 2 s, then 45 Hz for 1.5 s. The
// spike SNR (peak over three noise standard deviations, on the raw samples)
// is 0, 2.5, 5 and 10 dB for channels c/4 = 0..3.
//
// The firing rate is estimated as in the chip evaluation: windows of the map
// scoring 100 % (65535) are counted over the last second, adjacent such
// windows counting once. Estimates every 0.25 s are printed per SNR group.
// Checks: every window arrives; at 10 dB the four-channel mean estimate over
// the last second lies within 30-60 Hz and above the mean over the second
// before the step. Lower SNRs are only reported: there, noise windows also
// reach 100 % and the estimates run well above the true rates.
module tb_workload_rate_step;
  import ecpc_pkg::*;

  localparam int TT = 10000;
  localparam int FS = 40000;
  localparam int STEP = 2 * FS;
  localparam int NSAMP = STEP + 3 * FS / 2;
  localparam int NWIN = NSAMP / 64;
  localparam int WPS = FS / 64;                 // windows per second

  logic clk = 0, rst_n = 0, sin = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic lfp_sout, bpf_sout, prob_sout;
  logic [15:0] trained;
  logic frame_err;
  int checks = 0, failures = 0;

  ecpc_top #(.T_TRAIN(TT)) dut (.*);

  always #5 clk = ~clk;

  real pi = 3.14159265358979;
  real snr_db [4] = '{0.0, 2.5, 5.0, 10.0};

  function automatic real tmpl(input int k);   // unit-peak spike shape
    if (k < 8)  return -$sin(pi * k / 8.0);
    if (k < 24) return 0.5 * $sin(pi * (k - 8) / 16.0);
    return 0.0;
  endfunction

  // ---------------- stimulus, generated sample by sample --------------------
  int  next_spk [16];
  int  sp_k [16];                               // position inside a spike, -1 idle
  int  n_true [16];

  function automatic int sample(input int c, input int n);
    real x;
    int gap;
    if (n == next_spk[c]) begin
      sp_k[c] = 0;
      n_true[c]++;
      gap = (n < STEP) ? FS / 5 : FS / 45;
      next_spk[c] = n + gap / 2 + int'($urandom_range(0, gap));
    end
    x = 1500.0 * $sin(2.0 * pi * 8.0 * n / FS + c)
      + real'($urandom_range(0, 600)) + real'($urandom_range(0, 600))
      + real'($urandom_range(0, 600)) + real'($urandom_range(0, 600)) - 1200.0;
    if (sp_k[c] >= 0) begin
      x += 3.0 * 346.0 * (10.0 ** (snr_db[c / 4] / 20.0)) * tmpl(sp_k[c]);
      sp_k[c] = (sp_k[c] == 23) ? -1 : sp_k[c] + 1;
    end
    return int'(x);
  endfunction

  // ---------------- probability deframer ----------------------------------
  logic [31:0] sr = 0;
  int fcnt = -1, fch = 0;
  bit full [16][NWIN];
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
        if (nwin[fch] < NWIN)
          full[fch][nwin[fch]] = ({sr[23:18], sr[15:10], sr[7:4]} == 16'hFFFF);
        nwin[fch]++;
      end
    end
  end

  // estimated rate of channel c over the second ending at window w
  function automatic int rate_est(input int c, input int w);
    int cnt = 0;
    for (int k = w - WPS + 1; k <= w; k++)
      if (full[c][k] && !(k > 0 && full[c][k - 1])) cnt++;
    return cnt;
  endfunction

  initial begin
    logic [31:0] f;
    real est;
    int  w;
    for (int c = 0; c < 16; c++) begin
      nwin[c] = 0; sp_k[c] = -1; n_true[c] = 0;
      next_spk[c] = int'($urandom_range(100, FS / 5));
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < NSAMP; n++)
      for (int c = 0; c < 16; c++) begin
        f = pack_frame(c == 0, 16'(sample(c, n)));
        for (int i = 31; i >= 0; i--) begin
          @(negedge clk);
          sin = f[i];
        end
      end
    repeat (2000) @(negedge clk);

    for (int c = 0; c < 16; c++) begin
      checks++;
      if (nwin[c] != NWIN) begin failures++; $display("ch%0d windows %0d", c, nwin[c]); end
    end
    $display("estimated firing rate (Hz, mean of 4 channels) over the last second; step at 2.00 s");
    for (int g = 0; g < 4; g++) begin
      string line;
      line = $sformatf("SNR %4.1f dB:", snr_db[g]);
      for (int q = 5; q <= NSAMP * 4 / FS; q++) begin
        w = q * FS / 4 / 64 - 1;
        est = 0.0;
        for (int c = 4 * g; c < 4 * g + 4; c++) est += rate_est(c, w) / 4.0;
        line = {line, $sformatf(" %0.2fs:%0.1f", q / 4.0, est)};
      end
      $display("%s", line);
      if (g == 3) begin
        real r_pre, r_post;
        r_pre = 0.0; r_post = 0.0;
        for (int c = 12; c < 16; c++) begin
          r_pre += rate_est(c, STEP / 64 - 1) / 4.0;
          r_post += rate_est(c, NWIN - 1) / 4.0;
        end
        checks++;
        if (r_post < 30.0 || r_post > 60.0) begin failures++; $display("10 dB after step: %0.1f Hz", r_post); end
        checks++;
        if (r_post <= r_pre) begin failures++; $display("10 dB step not seen"); end
      end
    end
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
