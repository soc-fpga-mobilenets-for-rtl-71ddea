// Pointwise MAC test. A behavioural accumulator memory (one-clock read,
// write-back of out_sum at out_addr) is attached. Several passes of random
// pixels and custom-float weights run over a set of 24 addresses, the first
// pass with in_first; the memory contents after each pass are compared with
// an integer model of sum((pix * sig) >>> exp). Also checked: out_valid
// follows in_valid by exactly 8 clocks, the tag and address travel with it,
// and random input gaps do not disturb the result.
// The latency of 8 and the shift-per-weight arithmetic are the reference's.
module tb_pw_mac;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 24;

  logic in_valid = 0, in_first = 0;
  logic [31:0][15:0] in_pix;
  logic [31:0][7:0]  in_sig;
  logic [31:0][3:0]  in_exp;
  logic [11:0] in_addr, acc_raddr, out_addr;
  logic [15:0] in_tag, out_tag;
  logic acc_re, out_valid;
  logic signed [31:0] acc_rdata, out_sum;

  pw_mac #(.TAG_W(16)) dut (.clk, .rst_n, .in_valid, .in_pix, .in_sig, .in_exp, .in_first, .in_addr,
    .in_tag, .acc_re, .acc_raddr, .acc_rdata, .out_valid, .out_sum, .out_addr, .out_tag);

  logic signed [31:0] acc_mem [N];
  always_ff @(posedge clk) begin
    if (acc_re) acc_rdata <= acc_mem[acc_raddr];
    if (out_valid) acc_mem[out_addr] <= out_sum;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  longint model [N];
  int outs = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    outs++;
    chk(16'(cyc - 8) == out_tag, $sformatf("latency: issued %0d, out at %0d", out_tag, cyc));
  end

  initial begin
    acc_rdata = 0;
    in_pix = '0; in_sig = '0; in_exp = '0; in_addr = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 6; pass++) begin
      for (int a = 0; a < N; a++) begin
        automatic longint s = 0;
        while ($urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1; in_first = (pass == 0); in_addr = 12'(a); in_tag = 16'(cyc);
        for (int l = 0; l < 32; l++) begin
          in_pix[l] = 16'($urandom_range(6 << 13));
          in_sig[l] = 8'($urandom());
          in_exp[l] = 4'($urandom());
          if ($urandom_range(9) == 0) begin in_pix[l] = 16'hC000; in_sig[l] = 8'h80; in_exp[l] = 0; end
          s += (longint'(in_pix[l]) * longint'($signed(in_sig[l]))) >>> in_exp[l];
        end
        model[a] = (pass == 0) ? s : model[a] + s;
      end
      @(negedge clk); in_valid = 0;
      repeat (10) @(negedge clk);
      for (int a = 0; a < N; a++)
        chk(acc_mem[a] == 32'(model[a]), $sformatf("pass %0d addr %0d: %0d vs %0d", pass, a, acc_mem[a], model[a]));
    end
    chk(outs == 6 * N, $sformatf("%0d results", outs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
