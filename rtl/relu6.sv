// ReLU6 activation with a valid/tag pipeline.
//
// The input is a signed fixed-point number already aligned to the output
// format (FRAC fractional bits). It is clamped to the range [0, 6]: negative
// values give 0, values above 6 give 6.0 (6 << FRAC), and everything else
// passes unchanged, truncated to OUT_W unsigned bits. The comparison-and-select
// structure follows the architecture; the widths are parameters. Latency is one
// clock; valid and the TAG sideband (last flag, addresses) travel with the data.
// The one-clock latency is this design's choice.
module relu6 #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 16,
  parameter int unsigned FRAC  = 13,
  parameter int unsigned TAG_W = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_x,
  input  logic [TAG_W-1:0]       in_tag,
  output logic                   out_valid,
  output logic [OUT_W-1:0]       out_y,
  output logic [TAG_W-1:0]       out_tag
);
  localparam logic signed [IN_W-1:0] SIX = IN_W'(6) <<< FRAC;

  initial assert ((6 << FRAC) < (1 << OUT_W)) else $error("relu6: 6.0 does not fit OUT_W");

  logic [OUT_W-1:0] y_c;
  always_comb begin
    if (in_x < 0)        y_c = '0;
    else if (in_x > SIX) y_c = OUT_W'(SIX);
    else                 y_c = OUT_W'(in_x);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_y   <= y_c;
    out_tag <= in_tag;
  end
endmodule
