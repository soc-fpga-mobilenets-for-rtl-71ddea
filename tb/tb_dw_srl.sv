// Window shift register test: rows of 16, 9, 7 and 4 pixels are pushed one
// per clock; once two rows and three pixels are in, every window must hold the
// 3x3 neighbourhood ending at the newest pixel, in row-major order.
// The 35-register size for 16-pixel rows is the reference figure.
module tb_dw_srl;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic shift = 0;
  logic [7:0] din;
  logic [4:0] row_w;
  logic [8:0][7:0] win;

  dw_srl #(.PIX_W(8), .MAX_W(16)) dut (.clk, .shift, .din, .row_w, .win);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int widths [4] = '{16, 9, 7, 4};
    logic [7:0] img [256];
    foreach (widths[wi]) begin
      automatic int w = widths[wi];
      row_w = 5'(w);
      for (int i = 0; i < w * w; i++) img[i] = 8'($urandom_range(255));
      for (int i = 0; i < w * w; i++) begin
        @(negedge clk); shift = 1; din = img[i];
        @(negedge clk); shift = 0;
        if (i >= 2 * w + 2) begin
          automatic bit ok = 1;
          for (int k = 0; k < 9; k++)
            if (win[k] != img[i - (2 - k / 3) * w - (2 - k % 3)]) ok = 0;
          checks++;
          if (!ok) begin failures++; if (failures < 10) $display("FAIL w=%0d i=%0d", w, i); end
        end
      end
    end
    // holds when not shifting
    begin
      automatic logic [8:0][7:0] w0 = win;
      @(negedge clk); din = 8'h55; @(negedge clk);
      checks++; if (win != w0) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
