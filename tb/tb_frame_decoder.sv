// Testbench of frame_decoder: builds a serial stream of frames for 16
// channels (with idle gaps and one frame with a corrupted padding bit) and
// checks each decoded sample, its channel, and the error flag.
module tb_frame_decoder;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0, sin = 0;
  logic out_valid, frame_err;
  logic [3:0] out_ch;
  logic signed [15:0] out_data;
  int checks = 0, failures = 0, errs_seen = 0;

  frame_decoder dut (.*);

  always #5 clk = ~clk;

  typedef struct { int ch; logic [15:0] d; } smp_t;
  smp_t exp_q [$];

  task automatic send_frame(input int ch, input logic [15:0] d, input bit corrupt);
    logic [31:0] f;
    f = {(ch == 0) ? 8'b10101011 : 8'b10111101,
         d[15:10], 2'b00, d[9:4], 2'b00, d[3:0], 4'b0000};
    if (corrupt) f[9] = 1'b1;
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk);
      sin = f[i];
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      smp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("unexpected sample"); end
      else begin
        e = exp_q.pop_front();
        if (int'(out_ch) != e.ch || out_data !== e.d) begin
          failures++;
          $display("got ch%0d %h expected ch%0d %h", out_ch, out_data, e.ch, e.d);
        end
      end
    end
    if (frame_err) errs_seen++;
  end

  initial begin
    logic [15:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < 16; c++) begin
        d = (n == 0 && c < 2) ? (c == 0 ? 16'hFFFF : 16'h0000) : 16'($urandom);
        exp_q.push_back('{c, d});
        send_frame(c, d, 1'b0);
        if (n == 2 && c == 7) begin @(negedge clk); sin = 0; repeat (9) @(negedge clk); end
      end
    // corrupted frame: must be flagged and dropped
    send_frame(0, 16'h1234, 1'b1);
    @(negedge clk); sin = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d samples missing", exp_q.size()); end
    checks++;
    if (errs_seen != 1) begin failures++; $display("frame_err seen %0d times", errs_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
