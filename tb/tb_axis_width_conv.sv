// Width converter test: packets of random length (multiple of 8 bytes) pass
// through 64 -> 72 and 64 -> 96 bit converters with random valid and ready
// gaps; the output byte stream must equal the input, the final word must be
// zero-filled and carry tlast, and no other word may. A burst without gaps must
// move at least one input beat per clock on average.
// The byte order and zero-filled final word it checks are this design's conventions.
module tb_axis_width_conv;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid [2], s_ready [2], s_last [2], m_valid [2], m_ready [2], m_last [2];
  logic [63:0] s_data [2];
  logic [71:0] m9;
  logic [95:0] m12;

  axis_width_conv #(.IN_B(8), .OUT_B(9)) u9 (.clk, .rst_n, .s_valid(s_valid[0]), .s_ready(s_ready[0]),
    .s_data(s_data[0]), .s_last(s_last[0]), .m_valid(m_valid[0]), .m_ready(m_ready[0]), .m_data(m9),
    .m_last(m_last[0]));
  axis_width_conv #(.IN_B(8), .OUT_B(12)) u12 (.clk, .rst_n, .s_valid(s_valid[1]), .s_ready(s_ready[1]),
    .s_data(s_data[1]), .s_last(s_last[1]), .m_valid(m_valid[1]), .m_ready(m_ready[1]), .m_data(m12),
    .m_last(m_last[1]));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic run(input int u, input int ob, input int nbeats, input bit gaps, output int cycles);
    byte unsigned in_b [$], out_b [$];
    int sent = 0, t0 = 0, words = 0, nlast = 0;
    bit done = 0;
    for (int i = 0; i < nbeats * 8; i++) in_b.push_back(byte'($urandom()));
    fork
      begin
        while (sent < nbeats) begin
          s_valid[u] <= gaps ? ($urandom_range(3) != 0) : 1'b1;
          for (int k = 0; k < 8; k++) s_data[u][k*8 +: 8] <= in_b[sent*8+k];
          s_last[u] <= (sent == nbeats - 1);
          @(posedge clk);
          if (s_valid[u] && s_ready[u]) sent++;
        end
        s_valid[u] <= 0; s_last[u] <= 0;
      end
      begin
        while (!done) begin
          m_ready[u] <= gaps ? ($urandom_range(3) != 0) : 1'b1;
          @(posedge clk);
          t0++;
          if (m_valid[u] && m_ready[u]) begin
            for (int k = 0; k < ob; k++) out_b.push_back(u == 0 ? m9[k*8 +: 8] : m12[k*8 +: 8]);
            words++;
            if (m_last[u]) begin nlast++; done = 1; end
          end
        end
        m_ready[u] <= 0;
      end
    join
    cycles = t0;
    chk(nlast == 1, "one tlast per packet");
    chk(words == (nbeats * 8 + ob - 1) / ob, $sformatf("word count %0d", words));
    for (int i = 0; i < out_b.size(); i++)
      chk(out_b[i] == ((i < in_b.size()) ? in_b[i] : 8'h00), $sformatf("byte %0d", i));
  endtask

  initial begin
    int cyc;
    foreach (s_valid[u]) begin s_valid[u] = 0; s_last[u] = 0; m_ready[u] = 0; s_data[u] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      run(0, 9, 1 + $urandom_range(40), 1, cyc);
      run(1, 12, 1 + $urandom_range(40), 1, cyc);
    end
    run(0, 9, 72, 0, cyc);    // 32 depthwise kernels: 576 bytes
    chk(cyc <= 72 + 4, $sformatf("64->72 burst of 72 beats took %0d clocks", cyc));
    run(1, 12, 24, 0, cyc);   // 32 Batch Norm triples: 192 bytes
    chk(cyc <= 24 + 4, $sformatf("64->96 burst of 24 beats took %0d clocks", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
