// Batch Norm unit: y = (((x >>> sh_in) - mu) * p >>> sh_mul + beta) >>> sh_out.
//
// The two multiplications of Batch Norm (gamma and 1/sqrt(var+eps)) are folded
// offline into the single factor p, so one multiplier and two adders remain.
// Three right shifts align the fixed-point operands: the convolution result to
// the format of mu, the product to the format of beta, and the sum to the
// fixed-point format ReLU6 works in. The shift amounts are constant for a
// stage; the parameters change per channel and arrive together with x. The
// exact position of the three shifts is this design's reading of the
// architecture, which states only that operands are aligned by right shifts
// before the addition and before ReLU6.
// Pipeline: 4 clocks (subtract, multiply, add, output shift); valid and TAG
// travel alongside.
module batch_norm
  import mbn_pkg::*;
#(
  parameter int unsigned X_W   = ACC_W,
  parameter int unsigned TAG_W = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bn_shift_t             sh,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] in_x,
  input  bn_param_t             in_par,
  input  logic [TAG_W-1:0]      in_tag,
  output logic                  out_valid,
  output logic signed [31:0]    out_y,
  output logic [TAG_W-1:0]      out_tag
);
  localparam int unsigned D_W = (X_W > BN_W ? X_W : BN_W) + 1;
  localparam int unsigned M_W = D_W + BN_W;

  logic [3:0] v;
  logic [TAG_W-1:0] tag1, tag2, tag3;
  logic signed [D_W-1:0] d1;
  logic signed [BN_W-1:0] p1, beta1, beta2;
  logic signed [M_W-1:0] m2;
  logic signed [M_W:0]   a3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    // 1: align the convolution result and subtract the mean
    d1    <= D_W'(in_x >>> sh.sh_in) - D_W'(in_par.mu);
    p1    <= in_par.p;
    beta1 <= in_par.beta;
    tag1  <= in_tag;
    // 2: scale
    m2    <= M_W'(d1) * M_W'(p1);
    beta2 <= beta1;
    tag2  <= tag1;
    // 3: align the product and add beta
    a3    <= (M_W+1)'(m2 >>> sh.sh_mul) + (M_W+1)'(beta2);
    tag3  <= tag2;
    // 4: align to the activation format
    out_y   <= 32'(a3 >>> sh.sh_out);
    out_tag <= tag3;
  end

  assign out_valid = v[3];
endmodule
