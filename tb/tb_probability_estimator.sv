// Testbench of probability_estimator. Parameters are written for channels
// 0..11 through the four engine ports; channels 12..15 stay untrained. Random
// Zn values are applied and each score is compared with (a) a model written
// here with the same log2 and 2^-u approximations and exact division, within
// 2 LSB, and (b) the exact formula 1/(1+2^(Ln-Ld)) with true logarithms,
// within 0.12. The winner-take-all output is checked to be the per-channel
// maximum of every 64-sample window, emitted once per channel per window.
module tb_probability_estimator;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic par_we [N_ENG];
  logic [3:0] par_ch [N_ENG];
  ecpc_params_t par [N_ENG];
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic [15:0] in_zn = 0;
  logic p_valid;
  logic [3:0] p_ch;
  logic [15:0] p_score;
  logic win_valid;
  logic [3:0] win_ch;
  logic [15:0] win_score;
  logic [15:0] ch_trained;
  int checks = 0, failures = 0;

  probability_estimator dut (.*);

  always #5 clk = ~clk;

  ecpc_params_t tp [16];
  int wmax [16];
  int nwin = 0, nsamp = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real mlog2(input int v);
    int p;
    p = 0;
    for (int i = 0; i < 31; i++) if ((v >> i) & 1) p = i;
    return real'(p) + real'(((longint'(v) << (40 - p)) >> 32) & 255) / 256.0;
  endfunction

  // approximate model: Q8 log values, 2^-u = (1 - f/2) * 2^-i
  function automatic int model_q(input int c, input int zn);
    longint ln_n, ln_d, d, u, t, lz;
    if (c >= 12 || zn == 0) return 0;
    lz = longint'(mlog2(zn) * 256.0) - 2048;
    ln_n = longint'(tp[c].a_ec) + ((longint'(tp[c].b_ec) * zn) >>> 8);
    ln_d = longint'(tp[c].a_pc) + ((longint'(tp[c].b_pc) * lz) >>> 8);
    d = ln_n - ln_d;
    if (d >= 4096) return 0;
    if (d <= -4096) return 65535;
    u = d < 0 ? -d : d;
    t = (65536 - (u % 256) * 128) >>> (u / 256);
    if (d >= 0) return int'((t * 65536) / (65536 + t));
    return int'((longint'(65536) * 65536) / (65536 + t) > 65535 ? 65535 : (longint'(65536) * 65536) / (65536 + t));
  endfunction

  function automatic real exact_p(input int c, input int zn);
    real z, ln_n, ln_d;
    if (c >= 12 || zn == 0) return 0.0;
    z = real'(zn) / 256.0;
    ln_n = real'(tp[c].a_ec) / 256.0 + real'(tp[c].b_ec) / 256.0 * z;
    ln_d = real'(tp[c].a_pc) / 256.0 + real'(tp[c].b_pc) / 256.0 * ($ln(z) / $ln(2.0));
    return 1.0 / (1.0 + $pow(2.0, ln_n - ln_d));
  endfunction

  initial begin
    int zn, e, pos;
    for (int e2 = 0; e2 < N_ENG; e2++) begin par_we[e2] = 0; par_ch[e2] = 0; par[e2] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // parameters for channels 0..11, three writes per engine port
    for (int r = 0; r < 3; r++) begin
      @(negedge clk);
      for (int e2 = 0; e2 < N_ENG; e2++) begin
        int c;
        c = 3 * e2 + r;
        tp[c].a_ec = 16'(13 * 256 + 20 * c);
        tp[c].b_ec = -16'sd185 - 16'(4 * c);
        tp[c].a_pc = 16'(14 * 256 + 30 * c);
        tp[c].b_pc = -16'(4 * 256 + 16 * c);
        par_we[e2] = 1; par_ch[e2] = 4'(c); par[e2] = tp[c];
      end
      @(negedge clk);
      for (int e2 = 0; e2 < N_ENG; e2++) par_we[e2] = 0;
    end
    checks++;
    if (ch_trained != 16'h0FFF) begin failures++; $display("trained %h", ch_trained); end
    for (int n = 0; n < 64 * 6; n++) begin
      pos = n % 64;
      for (int c = 0; c < 16; c++) begin
        zn = ($urandom_range(0, 19) == 0) ? 0 : int'($urandom_range(1, 16 * 256));
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_zn = 16'(zn);
        @(negedge clk);
        in_valid = 0;
        e = model_q(c, zn);
        checks++;
        if (!p_valid || p_ch != 4'(c) || int'(p_score) - e > 2 || e - int'(p_score) > 2) begin
          failures++;
          if (failures < 10) $display("ch%0d zn %0d got %0d model %0d", c, zn, p_score, e);
        end
        checks++;
        if (rabs(real'(p_score) / 65536.0 - exact_p(c, zn)) > 0.12) begin
          failures++;
          if (failures < 10) $display("ch%0d zn %0d got %0d exact %f", c, zn, p_score, exact_p(c, zn));
        end
        if (pos == 0 || int'(p_score) > wmax[c]) wmax[c] = int'(p_score);
        checks++;
        if (win_valid != (pos == 63)) begin failures++; $display("window strobe wrong at %0d", pos); end
        if (win_valid) begin
          nwin++;
          checks++;
          if (win_ch != 4'(c) || int'(win_score) != wmax[c]) begin
            failures++;
            $display("window ch%0d got %0d expected %0d", c, win_score, wmax[c]);
          end
        end
        repeat (4) @(negedge clk);
      end
    end
    checks++;
    if (nwin != 6 * 16) begin failures++; $display("windows %0d", nwin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
