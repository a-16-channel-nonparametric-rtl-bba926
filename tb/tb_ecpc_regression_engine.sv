// Testbench of ecpc_regression_engine (engine 1, channels 4..7, shortened
// training period). All 16 channels carry normalised samples drawn here from
// an exponential noise distribution plus a uniform "spike" tail. The
// testbench builds its own histogram of the channel in training (saturating
// 14/10-bit counters, samples during a fit not counted), computes log2 by its
// own leading-one routine and fits both lines by floating-point least
// squares. Each parameter write is checked for channel order (4,5,6,7,4),
// values (slopes within 3, intercepts within 12 LSB of Q8.8), and latency
// (at most 40 clocks after the last training sample). The EC slope must also
// match the true noise slope -log2(e)/2 within 50 % (2000 samples are few).
module tb_ecpc_regression_engine;
  import ecpc_pkg::*;

  localparam int TT = 2000;
  localparam int PCF = 48;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic [15:0] in_zn = 0;
  logic par_we;
  logic [3:0] par_ch;
  ecpc_params_t par;
  logic [3:0] train_ch;
  logic fitting;
  int checks = 0, failures = 0;

  ecpc_regression_engine #(.ENGINE_ID(1), .T_TRAIN(TT)) dut (.*);

  always #5 clk = ~clk;

  int hist [36];
  int n_tr = 0, cur = 4, n_fit = 0;
  int last_sample_time = 0, now = 0;
  real e_aec, e_bec, e_apc, e_bpc;

  always @(posedge clk) now++;

  function automatic real mlog2(input int v);   // leading one + 8 mantissa bits
    int p;
    if (v <= 0) return 0.0;
    p = 0;
    for (int i = 0; i < 31; i++) if ((v >> i) & 1) p = i;
    return real'(p) + real'(((longint'(v) << (40 - p)) >> 32) & 255) / 256.0;
  endfunction

  task automatic fit(input int off, input int n, input bit is_pc, output real a, output real b);
    real sx, sy, sxx, sxy, x, y;
    sx = 0; sy = 0; sxx = 0; sxy = 0;
    for (int k = 0; k < n; k++) begin
      x = is_pc ? mlog2((PCF + k) * 64 + 32) - 8.0 : (2 * k + 1) * 0.125;
      y = mlog2(hist[off + k]);
      sx += x; sy += y; sxx += x * x; sxy += x * y;
    end
    b = (n * sxy - sx * sy) / (n * sxx - sx * sx);
    a = (sy - b * sx) / n;
  endtask

  always @(posedge clk) if (rst_n && par_we) begin
    real a1, b1, a2, b2;
    fit(0, 4, 1'b0, a1, b1);
    fit(4, 32, 1'b1, a2, b2);
    checks++;
    if (int'(par_ch) != cur) begin failures++; $display("trained ch%0d expected %0d", par_ch, cur); end
    checks++;
    if (now - last_sample_time > 40) begin failures++; $display("fit took %0d clocks", now - last_sample_time); end
    checks++;
    if (rabs(real'(par.b_ec) / 256.0 - b1) > 3.0 / 256 || rabs(real'(par.a_ec) / 256.0 - a1) > 12.0 / 256 ||
        rabs(real'(par.b_pc) / 256.0 - b2) > 3.0 / 256 || rabs(real'(par.a_pc) / 256.0 - a2) > 12.0 / 256) begin
      failures++;
      $display("got a_ec %0d b_ec %0d a_pc %0d b_pc %0d expected %0.1f %0.1f %0.1f %0.1f",
               par.a_ec, par.b_ec, par.a_pc, par.b_pc, a1 * 256, b1 * 256, a2 * 256, b2 * 256);
    end
    checks++;
    if (real'(par.b_ec) / 256.0 > -0.36 || real'(par.b_ec) / 256.0 < -1.08) begin
      failures++; $display("EC slope %0d far from -185", par.b_ec);
    end
    for (int k = 0; k < 36; k++) hist[k] = 0;
    n_tr = 0;
    cur = (cur == 7) ? 4 : cur + 1;
    n_fit++;
  end

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    int zq, b;
    real u;
    for (int k = 0; k < 36; k++) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_fit < 5) begin
      for (int c = 0; c < 16; c++) begin
        u = real'($urandom_range(1, 1000000)) / 1000000.0;
        if ($urandom_range(0, 99) < 3) zq = int'($urandom_range(12 * 256, 20 * 256));
        else zq = int'(-$ln(u) * 2.0 * 256.0);
        if (zq > 65535) zq = 65535;
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_zn = 16'(zq);
        if (c == cur && !fitting) begin
          b = zq / 64;
          if (b < 4) begin if (hist[b] < 16383) hist[b]++; end
          else if (b >= PCF && b < PCF + 32) begin if (hist[4 + b - PCF] < 1023) hist[4 + b - PCF]++; end
          n_tr++;
          if (n_tr == TT) last_sample_time = now;
        end
        @(negedge clk);
        in_valid = 0;
        repeat (6) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
