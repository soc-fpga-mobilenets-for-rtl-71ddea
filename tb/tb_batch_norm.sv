// Batch Norm unit test: random inputs, parameters and shifts against
// y = (((x >>> s0) - mu) * p >>> s1 + beta) >>> s2 computed in 64-bit
// integers; checks the 4-clock latency of valid and tag.
// The formula checked is this design's reading of the folded Batch Norm.
module tb_batch_norm;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bn_shift_t sh;
  logic in_valid = 0;
  logic signed [31:0] in_x;
  bn_param_t in_par;
  logic [15:0] in_tag;
  logic out_valid;
  logic signed [31:0] out_y;
  logic [15:0] out_tag;

  batch_norm #(.TAG_W(16)) dut (.clk, .rst_n, .sh, .in_valid, .in_x, .in_par, .in_tag,
    .out_valid, .out_y, .out_tag);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int exp_y [$];
  int exp_t [$];
  int n_out = 0;

  function automatic int ref_bn(int x, int mu, int p, int beta, bn_shift_t s);
    longint d, m, a;
    d = (longint'(x) >>> s.sh_in) - mu;
    m = d * p;
    a = (m >>> s.sh_mul) + beta;
    return int'(a >>> s.sh_out);
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_y.size() == 0 || out_y != exp_y[0] || out_tag != 16'(exp_t[0])) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d exp=%0d", out_y, exp_y.size() ? exp_y[0] : 0);
    end
    if (exp_y.size()) begin void'(exp_y.pop_front()); void'(exp_t.pop_front()); end
    n_out++;
  end

  initial begin
    automatic int lat = 0;
    sh = '{sh_in: 5'd2, sh_mul: 5'd7, sh_out: 5'd1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency
    @(negedge clk);
    in_valid = 1; in_x = 1000; in_par = '{beta: 16'sd5, p: 16'sd3, mu: 16'sd10}; in_tag = 16'hbeef;
    exp_y.push_back(ref_bn(1000, 10, 3, 5, sh)); exp_t.push_back(16'hbeef);
    @(negedge clk); in_valid = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++; if (lat != 3) begin failures++; $display("FAIL latency %0d", lat + 1); end
    @(negedge clk);
    for (int k = 0; k < 6; k++) begin
      sh = '{sh_in: 5'($urandom_range(8)), sh_mul: 5'($urandom_range(12)), sh_out: 5'($urandom_range(4))};
      for (int i = 0; i < 300; i++) begin
        automatic int x = int'($urandom()) >>> $urandom_range(20);
        automatic int mu = int'($urandom_range(65535)) - 32768;
        automatic int p = int'($urandom_range(65535)) - 32768;
        automatic int beta = int'($urandom_range(65535)) - 32768;
        in_valid = ($urandom_range(3) != 0);
        in_x = x; in_par = '{beta: 16'(beta), p: 16'(p), mu: 16'(mu)}; in_tag = 16'(i);
        if (in_valid) begin exp_y.push_back(ref_bn(x, mu, p, beta, sh)); exp_t.push_back(i); end
        @(negedge clk);
      end
      in_valid = 0;
      repeat (6) @(negedge clk);   // shifts change only between batches
    end
    checks++; if (exp_y.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
