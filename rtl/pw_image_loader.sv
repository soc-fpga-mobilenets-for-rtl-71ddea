// PW image loader: gives each depthwise OFM pixel its place in the pointwise
// IFM memory.
//
// The depthwise stage produces its output channel by channel, but the
// pointwise stage consumes it in depth: one read of the pointwise IFM memory
// must return the 32 pixels that share a position in 32 consecutive channels.
// For a pixel of channel ch at output position idx this unit computes
//   addr = ((ch / 32) * npos + idx) * 32 + ch % 32
// (in 16-bit pixel units), so with 32 channels the pixels of position 0 fill
// addresses 0..31, those of position 1 addresses 32..63, and so on; a tile of
// 128 channels is stored as four such 32-channel groups one after the other.
// Pixel, address and last flag go straight to the pointwise memory, which
// needs no write control of its own. Latency: one clock.
// The grouping by position follows the architecture; the address formula and
// the one-clock latency are this design's own.
module pw_image_loader
  import mbn_pkg::*;
#(
  parameter int unsigned WA_W = $clog2(PW_PIX_PER_BUF)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           npos,
  input  logic                 in_valid,
  input  logic [DW_OUT_W-1:0]  in_pix,
  input  logic [7:0]           in_ch,
  input  logic [7:0]           in_idx,
  input  logic                 in_last,
  output logic                 out_valid,
  output logic [WA_W-1:0]      out_addr,
  output logic [DW_OUT_W-1:0]  out_pix,
  output logic                 out_last
);
  logic [WA_W-1:0] word;
  assign word = WA_W'(in_ch[7:5]) * WA_W'(npos) + WA_W'(in_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
    end
  end

  always_ff @(posedge clk) begin
    out_addr <= (word << 5) | WA_W'(in_ch[4:0]);
    out_pix  <= in_pix;
  end
endmodule
