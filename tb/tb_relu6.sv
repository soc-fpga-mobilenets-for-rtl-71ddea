// ReLU6 unit test: random and boundary inputs in two output formats
// (16-bit Q3.13 and 8-bit Q3.5); checks clamping at 0 and 6.0, pass-through,
// the one-clock latency of valid and tag.
// Output formats Q3.13 and Q3.5 are the reference's.
module tb_relu6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0;
  logic signed [31:0] in_x = 0;
  logic [7:0] in_tag = 0;
  logic v16, v8;
  logic [15:0] y16;
  logic [7:0]  y8, t16, t8;

  relu6 #(.IN_W(32), .OUT_W(16), .FRAC(13), .TAG_W(8)) u16 (.clk, .rst_n, .in_valid, .in_x, .in_tag,
    .out_valid(v16), .out_y(y16), .out_tag(t16));
  relu6 #(.IN_W(32), .OUT_W(8), .FRAC(5), .TAG_W(8)) u8 (.clk, .rst_n, .in_valid, .in_x, .in_tag,
    .out_valid(v8), .out_y(y8), .out_tag(t8));

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ref_y(int x, int frac);
    if (x < 0) return 0;
    if (x > (6 << frac)) return 6 << frac;
    return x;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    automatic int xs [$] = '{0, -1, 1, 49152, 49153, 49151, 192, 193, 191, -100000, 100000, 32'h7fffffff, 32'h80000000};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      automatic int x = (i < xs.size()) ? xs[i] : (i % 2 ? int'($urandom_range(60000)) - 5000 : int'($urandom_range(400)) - 100);
      @(negedge clk);
      in_valid = 1; in_x = x; in_tag = 8'(i);
      @(posedge clk); #1;
      chk(v16 && v8, "valid after one clock");
      chk(y16 == 16'(ref_y(x, 13)), $sformatf("16-bit x=%0d y=%0d", x, y16));
      chk(y8 == 8'(ref_y(x, 5)), $sformatf("8-bit x=%0d y=%0d", x, y8));
      chk(t16 == 8'(i) && t8 == 8'(i), "tag");
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    chk(!v16 && !v8, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
