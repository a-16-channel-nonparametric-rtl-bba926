// Testbench of spi_slave: writes coefficients in SPI mode 0 with SCLK at
// clk/8, aborts one frame half-way with chip select, and checks address,
// data and the number of write strobes.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  logic spi_sclk = 0, spi_cs_n = 1, spi_mosi = 0;
  logic wr_en;
  logic [4:0] wr_addr;
  logic [19:0] wr_data;
  int checks = 0, failures = 0;

  spi_slave dut (.*);

  always #5 clk = ~clk;

  typedef struct { logic [4:0] a; logic [19:0] d; } wr_t;
  wr_t exp_q [$];

  task automatic spi_word(input logic [31:0] w, input int nbits);
    spi_cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 31; i > 31 - nbits; i--) begin
      spi_mosi = w[i];
      repeat (4) @(negedge clk);
      spi_sclk = 1;
      repeat (4) @(negedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(negedge clk);
    spi_cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && wr_en) begin
    wr_t e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected write"); end
    else begin
      e = exp_q.pop_front();
      if (wr_addr !== e.a || wr_data !== e.d) begin
        failures++;
        $display("got %0d:%h expected %0d:%h", wr_addr, wr_data, e.a, e.d);
      end
    end
  end

  initial begin
    logic [4:0] a;
    logic [19:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12; n++) begin
      a = 5'($urandom_range(0, 24));
      d = 20'($urandom);
      if (n == 5) spi_word({3'b0, a, 4'b0, d}, 13);   // aborted: no write
      else begin
        exp_q.push_back('{a, d});
        spi_word({3'b0, a, 4'b0, d}, 32);
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("writes missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
