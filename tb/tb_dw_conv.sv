// Depthwise Conv MAC test: random 3x3 windows and kernels, one per clock with
// gaps; each result must equal the sum of the nine products and appear exactly
// six register stages after its inputs, with its tag. (Inputs presented
// before edge N+1 give a sum visible after edge N+6; the checker runs at edge
// N+7 and reads the cycle counter before it updates, so it compares with 5.)
// The latency of 6 clocks is the reference figure; the 32-bit exact sum is this design's.
module tb_dw_conv;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic [8:0][7:0] in_pix;
  logic [8:0][15:0] in_wgt;
  logic [11:0] in_tag;
  logic out_valid;
  logic signed [31:0] out_sum;
  logic [11:0] out_tag;

  dw_conv #(.TAG_W(12)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_wgt, .in_tag, .out_valid, .out_sum, .out_tag);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int exp_s [$];
  int exp_c [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_s.size() == 0 || out_sum != exp_s[0] || cyc - exp_c[0] != 5) begin
      failures++;
      if (failures < 10) $display("FAIL sum=%0d exp=%0d lat=%0d", out_sum, exp_s[0], cyc - exp_c[0]);
    end
    if (exp_s.size()) begin void'(exp_s.pop_front()); void'(exp_c.pop_front()); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      automatic int s = 0;
      @(negedge clk);
      in_valid = (i % 7 != 3);
      for (int k = 0; k < 9; k++) begin
        in_pix[k] = (i < 4) ? 8'hff : 8'($urandom_range(255));
        in_wgt[k] = (i < 2) ? 16'h8000 : (i < 4) ? 16'h7fff : 16'($urandom());
        s += int'(in_pix[k]) * int'($signed(in_wgt[k]));
      end
      in_tag = 12'(i);
      if (in_valid) begin exp_s.push_back(s); exp_c.push_back(cyc + 1); end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++; if (exp_s.size() != 0) begin failures++; $display("FAIL missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
