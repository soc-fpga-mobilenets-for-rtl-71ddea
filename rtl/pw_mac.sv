// Pointwise MAC: 32 pixels times 32 custom floating-point weights per clock,
// accumulated into an accumulator memory.
//
// Each weight is an 8-bit signed significand with a 4-bit biased exponent;
// the real weight is significand * 2^-(exponent + bias), the per-layer bias being
// folded into the later Batch Norm alignment. The unit therefore multiplies
// each pixel by the significand and shifts the product right by the exponent
// before adding:   sum = SUM_i (pix_i * sig_i) >>> exp_i.
// Pipeline of 8 register groups: 1 operands, 2 products, 3 shifted products,
// 4..7 adder tree (16, 8, 4, 2), 8 the tree result. In group 8 the result is
// added to the partial sum read from the accumulator memory at in_addr (or to
// zero for the first input-channel group, in_first); out_sum is that total,
// presented combinationally with out_valid 8 clocks after the inputs, to be
// written back to the same address. The accumulator read is issued one clock
// earlier (acc_re / acc_raddr), so the memory's one-clock latency is hidden.
// The 8 groups, 32 multipliers, per-weight shift and the accumulation in
// group 8 follow the architecture. Signed significands, ignoring the stored sum
// on the first channel group, and reading the accumulator in group 7 are this
// design's own choices.
module pw_mac
  import mbn_pkg::*;
#(
  parameter int unsigned LANES  = PW_LANES,
  parameter int unsigned PIX_W  = DW_OUT_W,
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned TAG_W  = 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic [LANES-1:0][PIX_W-1:0]     in_pix,
  input  logic [LANES-1:0][PW_SIG_W-1:0]  in_sig,
  input  logic [LANES-1:0][PW_EXP_W-1:0]  in_exp,
  input  logic                            in_first,
  input  logic [ADDR_W-1:0]               in_addr,
  input  logic [TAG_W-1:0]                in_tag,
  // accumulator read port
  output logic                            acc_re,
  output logic [ADDR_W-1:0]               acc_raddr,
  input  logic signed [ACC_W-1:0]         acc_rdata,
  // result
  output logic                            out_valid,
  output logic signed [ACC_W-1:0]         out_sum,
  output logic [ADDR_W-1:0]               out_addr,
  output logic [TAG_W-1:0]                out_tag
);
  localparam int unsigned LAT  = 8;
  localparam int unsigned PR_W = PIX_W + PW_SIG_W + 1;

  initial assert (LANES == 32) else $error("pw_mac: the adder tree is built for 32 lanes");

  typedef struct packed {
    logic              first;
    logic [ADDR_W-1:0] addr;
    logic [TAG_W-1:0]  tag;
  } side_t;

  logic [LAT-1:0] v;
  side_t          sd [LAT];

  logic [LANES-1:0][PIX_W-1:0]    p1;
  logic [LANES-1:0][PW_SIG_W-1:0] w1;
  logic [LANES-1:0][PW_EXP_W-1:0] e1, e2;
  logic signed [PR_W-1:0]  g2 [LANES];
  logic signed [ACC_W-1:0] g3 [32];
  logic signed [ACC_W-1:0] g4 [16];
  logic signed [ACC_W-1:0] g5 [8];
  logic signed [ACC_W-1:0] g6 [4];
  logic signed [ACC_W-1:0] g7 [2];
  logic signed [ACC_W-1:0] g8;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    sd[0] <= '{first: in_first, addr: in_addr, tag: in_tag};
    for (int i = 1; i < LAT; i++) sd[i] <= sd[i-1];
    // group 1: operands
    p1 <= in_pix;
    w1 <= in_sig;
    e1 <= in_exp;
    // group 2: products
    for (int i = 0; i < LANES; i++)
      g2[i] <= $signed({1'b0, p1[i]}) * $signed(w1[i]);
    e2 <= e1;
    // group 3: scale by the weight exponent
    for (int i = 0; i < LANES; i++)
      g3[i] <= ACC_W'(g2[i] >>> e2[i]);
    // groups 4..8: adder tree
    for (int i = 0; i < 16; i++) g4[i] <= g3[2*i] + g3[2*i+1];
    for (int i = 0; i < 8; i++)  g5[i] <= g4[2*i] + g4[2*i+1];
    for (int i = 0; i < 4; i++)  g6[i] <= g5[2*i] + g5[2*i+1];
    for (int i = 0; i < 2; i++)  g7[i] <= g6[2*i] + g6[2*i+1];
    g8 <= g7[0] + g7[1];
  end

  // accumulator read while the result is in group 7
  assign acc_re    = v[LAT-2] && !sd[LAT-2].first;
  assign acc_raddr = sd[LAT-2].addr;

  assign out_valid = v[LAT-1];
  assign out_sum   = g8 + (sd[LAT-1].first ? '0 : acc_rdata);
  assign out_addr  = sd[LAT-1].addr;
  assign out_tag   = sd[LAT-1].tag;
endmodule
