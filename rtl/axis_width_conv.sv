// AXI4-Stream data width converter (byte repacking, e.g. 64 -> 72 or 64 -> 96 bits).
//
// The DMA stream is 64 bits wide, while the depthwise weight memory is
// written 72 bits at a time and the Batch Norm memories 96 bits at a time.
// This unit repacks the byte stream: bytes are taken least significant first
// from each input beat and emitted least significant first in OUT_B-byte
// words. When the input beat carrying tlast has been taken, the remaining bytes
// are flushed, the final word is zero-filled if it is short, and it carries
// tlast. The repacking is the plainest way to perform the conversion; a
// converter between ratios that are not whole numbers is this design's choice.
// Input and output use valid/ready handshakes; data moves only when both are
// high. A beat can be accepted in the same clock in which a word leaves.
module axis_width_conv #(
  parameter int unsigned IN_B  = 8,
  parameter int unsigned OUT_B = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               s_valid,
  output logic               s_ready,
  input  logic [IN_B*8-1:0]  s_data,
  input  logic               s_last,
  output logic               m_valid,
  input  logic               m_ready,
  output logic [OUT_B*8-1:0] m_data,
  output logic               m_last
);
  localparam int unsigned BUF_B = IN_B + OUT_B;
  localparam int unsigned CNT_W = $clog2(BUF_B + 1);

  logic [BUF_B*8-1:0] buf_q;
  logic [CNT_W-1:0]   cnt;
  logic               flushing;
  logic               out_fire, in_fire;
  logic [CNT_W-1:0]   room;

  assign m_valid  = (cnt >= CNT_W'(OUT_B)) || (flushing && cnt != '0);
  assign m_data   = buf_q[OUT_B*8-1:0];
  assign m_last   = flushing && (cnt <= CNT_W'(OUT_B));
  assign out_fire = m_valid && m_ready;
  assign room     = out_fire ? ((cnt > CNT_W'(OUT_B)) ? cnt - CNT_W'(OUT_B) : '0) : cnt;
  assign s_ready  = !flushing && (room + CNT_W'(IN_B) <= CNT_W'(BUF_B));
  assign in_fire  = s_valid && s_ready;

  logic [BUF_B*8-1:0] buf_d;

  always_comb begin
    buf_d = buf_q;
    if (out_fire) buf_d = buf_d >> (OUT_B*8);
    if (in_fire) begin
      for (int i = 0; i < BUF_B; i++)
        if (i >= int'(room) && i < int'(room) + IN_B)
          buf_d[i*8 +: 8] = s_data[(i - int'(room))*8 +: 8];
    end
    // bytes above the count are kept zero so a short final word is zero-filled
    for (int i = 0; i < BUF_B; i++)
      if (i >= int'(room) + (in_fire ? IN_B : 0)) buf_d[i*8 +: 8] = 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      flushing <= 1'b0;
      buf_q    <= '0;
    end else begin
      buf_q <= buf_d;
      cnt   <= room + (in_fire ? CNT_W'(IN_B) : '0);
      if (in_fire && s_last)            flushing <= 1'b1;
      else if (out_fire && m_last)      flushing <= 1'b0;
    end
  end
endmodule
