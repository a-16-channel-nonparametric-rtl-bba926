// Field-potential (LFP) low-pass filter, shared by all 16 channels.
//
// The detector separates the local field potentials from the raw data with a
// low-pass filter at 250 Hz; the filter structure is this design's choice: a
// first-order IIR section y[n] = y[n-1] + alpha*(x[n] - y[n-1]) with
// alpha = 1 - exp(-2*pi*250/40000) = 0.0385 (2524 in Q0.16). One 32-bit state
// (Q16.16) per channel is kept in a register array and the single
// multiplier is time-shared by the channels.
//
// Interface: a (valid, channel, sample) triple in, the filtered sample of the
// same channel out one clock later.
module lfp_filter
  import ecpc_pkg::*;
#(
  parameter int unsigned ALPHA = 2524  // Q0.16 smoothing factor
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [CH_W-1:0]            in_ch,
  input  logic signed [SAMPLE_W-1:0] in_data,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic signed [SAMPLE_W-1:0] out_data
);

  logic signed [31:0] y [N_CH];
  logic signed [32:0] err;
  logic signed [50:0] prod;
  logic signed [31:0] y_new;

  always_comb begin
    err   = 33'(signed'({in_data, 16'h0000})) - 33'(y[in_ch]);
    prod  = 51'(err) * 51'(signed'({1'b0, 17'(ALPHA)}));
    y_new = y[in_ch] + 32'(prod >>> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) y[c] <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y[in_ch] <= y_new;
        out_ch   <= in_ch;
        out_data <= y_new[31:16];
      end
    end
  end

endmodule
