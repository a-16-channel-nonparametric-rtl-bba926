// Testbench of bandpass_filter: 16 interleaved channels with 50 Hz, 2 kHz and
// 15 kHz sines and random data. Every output is compared bit-exactly with a
// 64-bit integer model of the biquad cascade written here; the model reads
// the coefficients that the testbench writes. It checks the pass band
// (2 kHz amplitude kept within 5 %), the stop bands (50 Hz and 15 kHz below
// 2 %), the 10-clock latency, and that a coefficient write through the port
// changes the response (with the gain set to zero the output rings down
// below a third within 900 samples; the sharpest section has a pole radius of
// 0.9985, so it cannot fall silent at once).
module tb_bandpass_filter;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic coef_we = 0;
  logic [4:0] coef_addr = 0;
  logic [19:0] coef_data = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic signed [15:0] in_data = 0;
  logic out_valid;
  logic [3:0] out_ch;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;

  bandpass_filter dut (.*);

  always #5 clk = ~clk;

  // reference coefficients: 300 Hz - 8 kHz elliptic design, Q2.18
  longint rb1 [8] = '{443610, 143085, -9386, -524262, -60735, -524112, -523969, -523900};
  longint ra1 [8] = '{-275707, -208884, -164795, -486854, -147565, -513443, -520447, -522954};
  longint ra2 [8] = '{93619, 148447, 207378, 226967, 246489, 252224, 258939, 261367};
  longint rg = 2539;
  longint s1 [16][8];
  longint s2 [16][8];
  real pi = 3.14159265358979;

  function automatic longint wrap40(input longint v);
    return (v <<< 24) >>> 24;
  endfunction

  function automatic int model(input int c, input int x);
    longint s, w, q;
    s = wrap40(rg * x);
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

  function automatic int stim(input int c, input int n);
    case (c % 4)
      0: return int'($floor(8000.0 * $sin(2.0 * pi * 50.0 * n / 40000.0)));
      1: return int'($floor(8000.0 * $sin(2.0 * pi * 2000.0 * n / 40000.0)));
      2: return int'($floor(8000.0 * $sin(2.0 * pi * 15000.0 * n / 40000.0)));
      default: return int'($urandom_range(0, 16000)) - 8000;
    endcase
  endfunction

  int amp [4];
  int amp0 [4];

  task automatic run(input int nsamp, input int n0, input bit measure);
    int x, e, lat;
    for (int n = n0; n < n0 + nsamp; n++)
      for (int c = 0; c < 16; c++) begin
        x = stim(c, n);
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_data = 16'(x);
        e = model(c, x);
        @(negedge clk);
        in_valid = 0;
        lat = 1;
        while (!out_valid && lat < 40) begin @(negedge clk); lat++; end
        checks++;
        if (out_data !== 16'(e) || out_ch != 4'(c)) begin
          failures++;
          if (failures < 10) $display("ch%0d n%0d got %0d expected %0d", c, n, out_data, e);
        end
        checks++;
        if (lat != 10) begin failures++; if (failures < 10) $display("latency %0d", lat); end
        if (measure && n > n0 + 3 * nsamp / 4) begin
          if (int'(out_data) > amp[c % 4]) amp[c % 4] = int'(out_data);
        end
        repeat (20) @(negedge clk);
      end
  endtask

  initial begin
    for (int c = 0; c < 16; c++) for (int k = 0; k < 8; k++) begin s1[c][k] = 0; s2[c][k] = 0; end
    for (int i = 0; i < 4; i++) amp[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(2400, 0, 1'b1);
    $display("amplitudes 50Hz=%0d 2kHz=%0d 15kHz=%0d", amp[0], amp[1], amp[2]);
    checks++;
    if (amp[1] < 7600 || amp[1] > 8400) begin failures++; $display("pass band wrong"); end
    checks++;
    if (amp[0] > 160) begin failures++; $display("50 Hz not rejected"); end
    checks++;
    if (amp[2] > 160) begin failures++; $display("15 kHz not rejected"); end
    // coefficient write: modify section 0 a2 and the gain
    @(negedge clk);
    coef_we = 1; coef_addr = 5'd2; coef_data = 20'(100000); ra2[0] = 100000;
    @(negedge clk);
    coef_addr = 5'd24; coef_data = 20'(5000); rg = 5000;
    @(negedge clk);
    coef_we = 0;
    run(200, 2400, 1'b0);
    @(negedge clk);
    coef_we = 1; coef_addr = 5'd24; coef_data = 20'(0); rg = 0;
    @(negedge clk);
    coef_we = 0;
    for (int i = 0; i < 4; i++) begin amp0[i] = amp[i]; amp[i] = 0; end
    run(1200, 2600, 1'b1);
    $display("after gain 0: 2kHz=%0d random=%0d (before %0d, %0d)", amp[1], amp[3], amp0[1], amp0[3]);
    checks++;
    if (amp[1] * 3 > amp0[1] || amp[3] * 3 > amp0[3]) begin failures++; $display("gain 0 did not silence"); end
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
