// Input deframer: recovers the time-division multiplexed 16-bit samples from
// the 1-bit serial input stream.
//
// The input uses the same framing as the outputs: an 8-bit header (10101011
// for channel 0, 10111101 for the others) followed by 24 bits holding the
// sample with "00" after every six data bits. While idle the decoder compares
// the last eight received bits with both headers; after a header it collects
// 24 bits, removes the padding and reports the sample. A channel-0 header
// resets the channel count, any other header increments it. A frame whose
// padding bits are not zero is reported on frame_err and not passed on. That
// the input is framed like the outputs is this design's assumption.
//
// Timing: out_valid is a one-clock pulse, the clock after the last data bit.
module frame_decoder
  import ecpc_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sin,
  output logic                       out_valid,
  output logic [CH_W-1:0]            out_ch,
  output logic signed [SAMPLE_W-1:0] out_data,
  output logic                       frame_err
);

  logic [31:0]     sr;
  logic            collecting;
  logic [4:0]      cnt;
  logic [CH_W-1:0] ch;
  logic [31:0]     sr_next;

  assign sr_next = {sr[30:0], sin};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      collecting <= 1'b0;
      cnt        <= '0;
      ch         <= '0;
      out_valid  <= 1'b0;
      out_ch     <= '0;
      out_data   <= '0;
      frame_err  <= 1'b0;
    end else begin
      sr        <= sr_next;
      out_valid <= 1'b0;
      frame_err <= 1'b0;
      if (!collecting) begin
        if (sr_next[7:0] == HDR_FIRST) begin
          collecting <= 1'b1;
          cnt        <= '0;
          ch         <= '0;
        end else if (sr_next[7:0] == HDR_OTHER) begin
          collecting <= 1'b1;
          cnt        <= '0;
          ch         <= ch + 1'b1;
        end
      end else begin
        cnt <= cnt + 5'd1;
        if (cnt == 5'd23) begin
          collecting <= 1'b0;
          if (sr_next[17:16] == 2'b00 && sr_next[9:8] == 2'b00 && sr_next[3:0] == 4'b0000) begin
            out_valid <= 1'b1;
            out_ch    <= ch;
            out_data  <= {sr_next[23:18], sr_next[15:10], sr_next[7:4]};
          end else begin
            frame_err <= 1'b1;
          end
        end
      end
    end
  end

endmodule
