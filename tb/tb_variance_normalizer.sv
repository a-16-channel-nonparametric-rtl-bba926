// Testbench of variance_normalizer: random Z values of very different scale
// per channel. A model here tracks the moving average with the same update
// rule and forms the expected quotient with the division operator; every
// output is compared exactly. It also checks that exponentially distributed
// Z (mean 2*sigma^2) gives Zn with a mean near 2.0.
module tb_variance_normalizer;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic [41:0] in_z = 0;
  logic out_valid;
  logic [3:0] out_ch;
  logic [15:0] out_zn;
  int checks = 0, failures = 0;

  variance_normalizer #(.EMA_SHIFT(8)) dut (.*);

  always #5 clk = ~clk;

  longint acc [16];
  bit     ini [16];
  real    zsum = 0.0;
  int     zcnt = 0;

  initial begin
    longint z, m, e;
    real u;
    for (int c = 0; c < 16; c++) begin acc[c] = 0; ini[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++)
      for (int c = 0; c < 16; c++) begin
        u = (real'($urandom_range(1, 1000000)) / 1000000.0);
        // exponential with mean 2 * sigma^2, sigma^2 = 2^(c+4)
        z = longint'(-$ln(u) * 2.0 * real'(longint'(1) << (c + 4)));
        if (c == 15 && n % 97 == 0) z = 0;
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_z = 42'(z);
        if (!ini[c]) begin
          e = 512;
          acc[c] = z << 8;
          ini[c] = 1;
        end else begin
          m = acc[c] >> 8;
          if (m == 0) e = (z == 0) ? 0 : 65535;
          else begin
            e = (z * 512) / m;
            if (e > 65535) e = 65535;
          end
          acc[c] = acc[c] + z - m;
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_ch != 4'(c) || longint'(out_zn) != e) begin
          failures++;
          if (failures < 10) $display("ch%0d n%0d got %0d expected %0d", c, n, out_zn, e);
        end
        if (n > 500 && c < 15) begin zsum += real'(out_zn) / 256.0; zcnt++; end
      end
    checks++;
    if (zsum / zcnt < 1.8 || zsum / zcnt > 2.2) begin
      failures++; $display("mean Zn %f", zsum / zcnt);
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
