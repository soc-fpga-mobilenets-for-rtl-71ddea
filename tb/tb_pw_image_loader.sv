// PW image loader test: for 32- and 128-channel tiles, every pixel must be
// written at ((ch/32)*npos + idx)*32 + ch%32 one clock later, and the last flag
// must follow the last pixel only.
// The address formula checked is this design's; the 32-pixels-per-read grouping is the reference's.
module tb_pw_image_loader;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] npos;
  logic in_valid = 0, in_last = 0;
  logic [15:0] in_pix;
  logic [7:0] in_ch, in_idx;
  logic out_valid, out_last;
  logic [12:0] out_addr;
  logic [15:0] out_pix;

  pw_image_loader dut (.clk, .rst_n, .npos, .in_valid, .in_pix, .in_ch, .in_idx, .in_last,
    .out_valid, .out_addr, .out_pix, .out_last);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int cfgs [2][2] = '{'{32, 196}, '{128, 49}};
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (cfgs[k]) begin
      automatic int nch = cfgs[k][0], np = cfgs[k][1];
      bit seen [6272];
      foreach (seen[i]) seen[i] = 0;
      npos = 8'(np);
      for (int ch = 0; ch < nch; ch++)
        for (int idx = 0; idx < np; idx++) begin
          automatic int a = ((ch / 32) * np + idx) * 32 + ch % 32;
          @(negedge clk);
          in_valid = 1; in_ch = 8'(ch); in_idx = 8'(idx); in_pix = 16'($urandom());
          in_last = (ch == nch - 1 && idx == np - 1);
          @(posedge clk); #1;
          checks++;
          if (!out_valid || out_addr != 13'(a) || out_pix != in_pix || out_last != in_last) begin
            failures++;
            if (failures < 10) $display("FAIL ch=%0d idx=%0d addr=%0d exp=%0d", ch, idx, out_addr, a);
          end
          if (seen[a]) begin failures++; $display("FAIL address %0d twice", a); end
          seen[a] = 1;
        end
      @(negedge clk); in_valid = 0; in_last = 0;
      @(posedge clk); #1;
      checks++; if (out_valid || out_last) begin failures++; $display("FAIL valid/last stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
