// Full-size run of ecpc_top with every parameter at its default
// (T_TRAIN = 100000 samples = 2.5 s per channel).
//
// Noise with occasional spikes is sent on all 16 channels for one complete
// first training period plus a few probability windows. Checks: no channel
// is trained and every probability score is 0 before the first training
// period ends; the first channel of each of the four engines (0, 4, 8, 12)
// receives its parameters within the first 100000 samples + fit time, and
// no other channel does; after that those four channels deliver
// probability scores, one per 64 samples, some nonzero; the band-pass and
// LFP streams keep one frame per channel slot throughout.
module tb_ecpc_top_full;
  import ecpc_pkg::*;

  localparam int TT    = 100000;
  localparam int NSAMP = TT + 40 + 64 * 8;

  logic clk = 0, rst_n = 0, sin = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic lfp_sout, bpf_sout, prob_sout;
  logic [15:0] trained;
  logic frame_err;
  int checks = 0, failures = 0;

  ecpc_top dut (.*);

  always #5 clk = ~clk;

  // probability stream deframer
  logic [31:0] sr = 0;
  int pcnt = -1, pch = 0;
  int n_prob = 0, n_prob_nz = 0, n_prob_early_nz = 0;
  int n_sample = 0;
  int n_bpf_hdr = 0;
  logic [31:0] bsr = 0;

  always @(posedge clk) if (rst_n) begin
    sr = {sr[30:0], prob_sout};
    bsr = {bsr[30:0], bpf_sout};
    if (bsr[7:0] == 8'b10101011 || bsr[7:0] == 8'b10111101) n_bpf_hdr++;
    if (pcnt < 0) begin
      if (sr[7:0] == 8'b10101011) begin pcnt = 0; pch = 0; end
      else if (sr[7:0] == 8'b10111101) begin pcnt = 0; pch++; end
    end else if (++pcnt == 24) begin
      pcnt = -1;
      n_prob++;
      if ({sr[23:18], sr[15:10], sr[7:4]} != 16'h0) begin
        if (n_sample < TT) n_prob_early_nz++;
        else n_prob_nz++;
      end
    end
  end

  int spike_left [16];

  initial begin
    logic [31:0] f;
    int x;
    for (int c = 0; c < 16; c++) spike_left[c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NSAMP; n++) begin
      n_sample = n;
      for (int c = 0; c < 16; c++) begin
        x = int'($urandom_range(0, 800)) + int'($urandom_range(0, 800)) - 800;
        if (spike_left[c] == 0 && $urandom_range(0, 399) == 0) spike_left[c] = 16;
        if (spike_left[c] > 0) begin
          x += (spike_left[c] > 8) ? -5000 : 2500;
          spike_left[c]--;
        end
        f = {c == 0 ? 8'b10101011 : 8'b10111101, 24'h0};
        for (int i = 0; i < 16; i++) f[23 - i - 2 * (i / 6)] = 1'(x >>> (15 - i));
        for (int i = 31; i >= 0; i--) begin
          @(negedge clk);
          sin = f[i];
        end
      end
      if (n == TT - 100) begin
        checks++;
        if (trained != 16'h0000) begin failures++; $display("trained early: %h", trained); end
      end
      if (n % 20000 == 0) $display("sample %0d trained %h", n, trained);
    end
    repeat (600) @(negedge clk);
    checks++;
    if (trained != 16'h1111) begin failures++; $display("trained %h, expected 1111", trained); end
    checks++;
    if (n_prob_early_nz != 0) begin failures++; $display("%0d scores before training", n_prob_early_nz); end
    checks++;
    if (n_prob_nz == 0) begin failures++; $display("no nonzero score after training"); end
    checks++;
    if (n_prob < 16 * (NSAMP / 64) - 16) begin failures++; $display("probability frames %0d", n_prob); end
    checks++;
    if (n_bpf_hdr < 16 * NSAMP - 16) begin failures++; $display("band-pass frames %0d", n_bpf_hdr); end
    checks++;
    if (frame_err) failures++;
    $display("prob frames %0d nonzero %0d", n_prob, n_prob_nz);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * 512 + 50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
