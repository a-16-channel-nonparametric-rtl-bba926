// Testbench of frame_encoder: sends samples of 16 channels, one per 32
// clocks, plus one pair offered back to back (exercising the one-entry
// buffer), and compares every serial bit with a frame assembled here from the
// header strings and the six-bit grouping rule.
module tb_frame_encoder;
  import ecpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [3:0] in_ch = 0;
  logic [15:0] in_data = 0;
  logic sout, busy;
  int checks = 0, failures = 0;

  frame_encoder dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_frame(input int ch, input logic [15:0] d);
    logic [31:0] f;
    logic [7:0] h;
    h = (ch == 0) ? 8'hAB : 8'hBD;   // "10101011" / "10111101"
    f = {h, 24'h0};
    for (int i = 0; i < 6; i++) f[23 - i] = d[15 - i];
    for (int i = 0; i < 6; i++) f[15 - i] = d[9 - i];
    for (int i = 0; i < 4; i++) f[7 - i]  = d[3 - i];
    return f;
  endfunction

  logic [31:0] exp_q [$];
  int bitpos = 0;
  logic [31:0] cur;
  logic active = 0;

  // serial monitor: a frame starts on the clock after it is loaded
  always @(posedge clk) if (rst_n) begin
    if (busy) begin
      if (!active) begin
        if (exp_q.size() == 0) begin failures++; $display("unexpected frame"); end
        else begin cur = exp_q.pop_front(); active = 1; bitpos = 31; end
      end
      checks++;
      if (sout !== cur[bitpos]) begin
        failures++;
        if (failures < 10) $display("bit %0d mismatch got %b", bitpos, sout);
      end
      if (bitpos == 0) active = 0; else bitpos--;
    end else begin
      checks++;
      if (sout !== 1'b0) failures++;
    end
  end

  task automatic send(input int ch, input logic [15:0] d);
    @(negedge clk);
    in_valid = 1; in_ch = 4'(ch); in_data = d;
    exp_q.push_back(ref_frame(ch, d));
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++)
      for (int c = 0; c < 16; c++) begin
        send(c, 16'($urandom));
        repeat (30) @(negedge clk);
      end
    // two samples back to back: the second waits in the buffer
    send(0, 16'hFFFF);
    send(5, 16'h0000);
    repeat (100) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || active) begin failures++; $display("frames missing"); end
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
