// Output framer: packs one 16-bit sample per channel slot into a 32-bit frame
// and shifts it out MSB first, one bit per clock (20.48 Mb/s for 16 channels
// at 40 kHz).
//
// Frame: header 10101011 in front of channel 0, 10111101 in front of every
// other channel, then the data with "00" after each group of six bits so that
// a header can never appear inside the data. The headers and the "00" rule
// follow the detector's specification; the exact placement of the padding
// (d[15:10],00,d[9:4],00,d[3:0],0000) is this design's choice.
//
// Interface: in_valid/in_ch/in_data offer a sample. A frame loaded at clock t
// appears on sout during clocks t+1 .. t+32; a new frame can follow without a
// gap. A sample that arrives while a frame is being sent waits in a one-entry
// buffer; the line is 0 when idle.
module frame_encoder
  import ecpc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [CH_W-1:0]     in_ch,
  input  logic [SAMPLE_W-1:0] in_data,
  output logic                sout,
  output logic                busy
);

  logic [31:0] sh;
  logic [5:0]  cnt;        // bits still to send, including the current one
  logic        pend_v;
  logic [31:0] pend_f;
  logic        free_next;  // the shifter can take a frame this clock

  assign busy      = (cnt != 6'd0);
  assign sout      = busy ? sh[31] : 1'b0;
  assign free_next = (cnt <= 6'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh     <= '0;
      cnt    <= '0;
      pend_v <= 1'b0;
      pend_f <= '0;
    end else begin
      if (busy) begin
        sh  <= sh << 1;
        cnt <= cnt - 6'd1;
      end
      if (free_next && pend_v) begin
        sh     <= pend_f;
        cnt    <= 6'd32;
        pend_v <= in_valid;
        pend_f <= pack_frame(in_ch == '0, in_data);
      end else if (free_next && in_valid) begin
        sh  <= pack_frame(in_ch == '0, in_data);
        cnt <= 6'd32;
      end else if (in_valid) begin
        pend_v <= 1'b1;
        pend_f <= pack_frame(in_ch == '0, in_data);
      end
    end
  end

  // A sample must not arrive while one is already waiting.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && pend_v && !free_next))
    else $error("frame_encoder: sample dropped, buffer full");

endmodule
