// Testbench of lfp_filter: drives 16 interleaved channels (a 20 Hz sine, a
// 2 kHz sine, a DC step and random data) and compares every output with a
// floating-point first-order low-pass model (tolerance 2 LSB). It also checks
// that 20 Hz passes and 2 kHz is attenuated by the 250 Hz corner.
module tb_lfp_filter;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic signed [15:0] in_data = 0;
  logic out_valid;
  logic [3:0] out_ch;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0;

  lfp_filter dut (.*);

  always #5 clk = ~clk;

  real yref [16];
  real alpha = 2524.0 / 65536.0;
  real pi = 3.14159265358979;
  int  max_lo = 0, max_hi = 0;

  function automatic int stim(input int c, input int n);
    case (c % 4)
      0: return int'($floor(10000.0 * $sin(2.0 * pi * 20.0 * n / 40000.0)));
      1: return int'($floor(10000.0 * $sin(2.0 * pi * 2000.0 * n / 40000.0)));
      2: return (n > 100) ? 20000 : -5000;
      default: return int'($urandom_range(0, 40000)) - 20000;
    endcase
  endfunction

  initial begin
    int x, e;
    for (int c = 0; c < 16; c++) yref[c] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++)
      for (int c = 0; c < 16; c++) begin
        x = stim(c, n);
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c); in_data = 16'(x);
        yref[c] = yref[c] + alpha * (real'(x) - yref[c]);
        @(negedge clk);
        in_valid = 0;
        checks++;
        e = int'($floor(yref[c]));
        if (!out_valid || out_ch != 4'(c) || (int'(out_data) - e) > 2 || (e - int'(out_data)) > 2) begin
          failures++;
          if (failures < 10) $display("ch%0d n%0d got %0d expected %0d", c, n, out_data, e);
        end
        if (n > 2000 && c == 0 && (out_data > max_lo || -out_data > max_lo)) max_lo = int'(out_data > 0 ? out_data : -out_data);
        if (n > 2000 && c == 1 && (out_data > max_hi || -out_data > max_hi)) max_hi = int'(out_data > 0 ? out_data : -out_data);
      end
    checks++;
    if (max_lo < 9000) begin failures++; $display("20 Hz amplitude %0d", max_lo); end
    checks++;
    if (max_hi > 1500) begin failures++; $display("2 kHz amplitude %0d", max_hi); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
