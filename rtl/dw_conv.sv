// Depthwise Conv MAC: one 3x3 window times one 3x3 kernel per clock.
//
// Nine multipliers take the window pixels P1..P9 (unsigned) and the nine
// weights W1..W9 of the current channel (signed, all read from the weight
// memory in one access). An adder tree of registered levels (9 -> 5 -> 3 -> 2 -> 1)
// reduces the products. The latency from the input registers to out_sum is 6
// clocks, one result per clock. Valid and a TAG sideband (last flag, channel,
// output index, Batch Norm parameters) are delayed by the same amount so they
// leave with their result. Window and weight order: index 0 is the top-left
// tap, row-major.
// From the architecture: nine parallel multipliers, one kernel read per channel,
// latency 6, valid/last carried along. This design's own choices: the split
// of the adder tree, the full-precision 32-bit sum and the generic tag.
module dw_conv
  import mbn_pkg::*;
#(
  parameter int unsigned PIX_W = DW_PIX_W,
  parameter int unsigned WGT_W = DW_WGT_W,
  parameter int unsigned TAG_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [8:0][PIX_W-1:0]   in_pix,
  input  logic [8:0][WGT_W-1:0]   in_wgt,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] out_sum,
  output logic [TAG_W-1:0]        out_tag
);
  localparam int unsigned LAT = 6;
  localparam int unsigned PR_W = PIX_W + WGT_W + 1;

  logic [LAT-1:0] v;
  logic [TAG_W-1:0] tag_q [LAT];

  logic [8:0][PIX_W-1:0]          p_r;
  logic [8:0][WGT_W-1:0]          w_r;
  logic signed [PR_W-1:0]         prod [9];
  logic signed [ACC_W-1:0]        s1 [5];
  logic signed [ACC_W-1:0]        s2 [3];
  logic signed [ACC_W-1:0]        s3 [2];
  logic signed [ACC_W-1:0]        s4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag_q[0] <= in_tag;
    for (int i = 1; i < LAT; i++) tag_q[i] <= tag_q[i-1];
    // 1: operand registers
    p_r <= in_pix;
    w_r <= in_wgt;
    // 2: products
    for (int i = 0; i < 9; i++)
      prod[i] <= $signed({1'b0, p_r[i]}) * $signed(w_r[i]);
    // 3..6: adder tree
    for (int i = 0; i < 4; i++) s1[i] <= ACC_W'(prod[2*i]) + ACC_W'(prod[2*i+1]);
    s1[4] <= ACC_W'(prod[8]);
    s2[0] <= s1[0] + s1[1];
    s2[1] <= s1[2] + s1[3];
    s2[2] <= s1[4];
    s3[0] <= s2[0] + s2[1];
    s3[1] <= s2[2];
    s4    <= s3[0] + s3[1];
  end

  assign out_sum   = s4;
  assign out_valid = v[LAT-1];
  assign out_tag   = tag_q[LAT-1];
endmodule
