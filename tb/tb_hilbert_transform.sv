// Testbench of hilbert_transform: feeds 16 interleaved channels (random data
// on most, a 2.5 kHz sine on channel 3) and compares every output with the
// analytic signal of the same 16-sample block computed here by a direct DFT,
// the +-pi/2 rotation and an inverse DFT in floating point (tolerance 6 LSB).
// It checks the 30-sample delay, Z = re^2 + im^2, and that the sine gives a
// constant envelope.
module tb_hilbert_transform;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic signed [15:0] in_data = 0;
  logic out_valid;
  logic [3:0] out_ch;
  logic signed [20:0] out_re, out_im;
  logic [41:0] out_z;
  int checks = 0, failures = 0;

  hilbert_transform dut (.*);

  always #5 clk = ~clk;

  localparam int NS = 16 * 12;   // samples per channel
  int  xs [16][NS];
  int  nout [16];
  real pi = 3.14159265358979;

  task automatic analytic(input int c, input int g, output real vr, output real vi);
    real xr [16];
    real xi [16];
    real yr, yi, ang;
    int b;
    b = g / 16;
    vr = 0.0; vi = 0.0;
    for (int k = 0; k < 16; k++) begin
      xr[k] = 0.0; xi[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        ang = -2.0 * pi * k * n / 16.0;
        xr[k] += xs[c][16 * b + n] * $cos(ang);
        xi[k] += xs[c][16 * b + n] * $sin(ang);
      end
    end
    for (int k = 0; k < 16; k++) begin
      // X + i*H*X: 1 at k = 0 and 8, 2 for positive, 0 for negative bins
      real f;
      f = (k == 0 || k == 8) ? 1.0 : (k < 8 ? 2.0 : 0.0);
      ang = 2.0 * pi * k * (g % 16) / 16.0;
      yr = f * (xr[k] * $cos(ang) - xi[k] * $sin(ang));
      yi = f * (xr[k] * $sin(ang) + xi[k] * $cos(ang));
      vr += yr / 16.0;
      vi += yi / 16.0;
    end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int env_min = 1 << 30, env_max = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    int c, g;
    real vr, vi;
    c = int'(out_ch);
    if (nout[c] >= 32) begin
      g = nout[c] - 30;
      analytic(c, g, vr, vi);
      checks++;
      if (rabs(real'(out_re) - vr) > 6.0 || rabs(real'(out_im) - vi) > 6.0) begin
        failures++;
        if (failures < 10) $display("ch%0d g%0d got %0d,%0d expected %0.1f,%0.1f", c, g, out_re, out_im, vr, vi);
      end
      checks++;
      if (out_z != 42'(longint'(out_re) * longint'(out_re) + longint'(out_im) * longint'(out_im))) failures++;
      if (c == 3) begin
        if (int'(out_z >> 16) < env_min) env_min = int'(out_z >> 16);
        if (int'(out_z >> 16) > env_max) env_max = int'(out_z >> 16);
      end
    end
    nout[c]++;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      nout[c] = 0;
      for (int n = 0; n < NS; n++)
        xs[c][n] = (c == 3) ? int'($floor(12000.0 * $sin(2.0 * pi * 2500.0 * n / 40000.0)))
                            : int'($urandom_range(0, 24000)) - 12000;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++)
      for (int c = 0; c < 16; c++) begin
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_data = 16'(xs[c][n]);
        @(negedge clk);
        in_valid = 0;
        repeat (14) @(negedge clk);
      end
    repeat (40) @(negedge clk);
    checks++;
    if (nout[0] != NS) begin failures++; $display("outputs %0d", nout[0]); end
    // 12000^2 / 2^16 = 2197; the envelope of an on-bin sine is flat
    checks++;
    if (env_min < 2150 || env_max > 2250) begin
      failures++; $display("envelope %0d..%0d", env_min, env_max);
    end
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
