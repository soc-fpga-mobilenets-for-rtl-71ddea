// Pointwise stage test. A depthwise-side model writes IFM buffers (16-bit
// pixels with their addresses, as the PW image loader produces them) whenever
// m_start_dw allows; separate processes stream the Batch Norm parameters,
// weight significands and exponents (in ping-pong blocks where the stage
// needs more than one); the OFM stream is compared byte by byte with an
// integer model of sum((pix * sig) >>> exp) over all input channels, Batch
// Norm and ReLU6, in send order, including tlast. Three stage shapes are run:
// two filter groups per depthwise tile (nf = 2, two spatial tiles); two
// input-channel tiles with accumulation and a weight reload into the second
// half; four channel groups of 32 (7x7x128) with a reload. Each sub-stage must
// issue cgroups*3136 reads and finish within 16 clocks after the last one
// (the 3,152-clock sub-stage for 3,136 positions).
// The 3,152-clock sub-stage is the reference figure; the stage walk and layouts are this design's.
module tb_pw_stage;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mbn_cfg_t cfg;
  logic start = 0, dw_wvalid = 0, dw_wlast = 0, m_start_dw;
  logic [12:0] dw_waddr;
  logic [15:0] dw_wdata;
  logic bn_v = 0, bn_r, w_v = 0, w_r, w_l = 0, s_v = 0, s_r, s_l = 0, m_valid, m_ready = 0, m_last, busy;
  logic [95:0] bn_d;
  logic [63:0] w_d, s_d, m_data;

  pw_stage dut (.clk, .rst_n, .start, .cfg, .dw_wvalid, .dw_waddr, .dw_wdata, .dw_wlast, .m_start_dw,
    .s_pwbn_valid(bn_v), .s_pwbn_ready(bn_r), .s_pwbn_data(bn_d), .s_pww_valid(w_v), .s_pww_ready(w_r),
    .s_pww_data(w_d), .s_pww_last(w_l), .s_pws_valid(s_v), .s_pws_ready(s_r), .s_pws_data(s_d),
    .s_pws_last(s_l), .m_ofm_valid(m_valid), .m_ofm_ready(m_ready), .m_ofm_data(m_data),
    .m_ofm_last(m_last), .busy);

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic longint bn_ref(longint x, int mu, int p, int beta, bn_shift_t sh);
    longint d = (x >>> sh.sh_in) - longint'(mu);
    longint a = ((d * longint'(p)) >>> sh.sh_mul) + longint'(beta);
    return longint'(int'(a >>> sh.sh_out));
  endfunction

  // sub-stage timing, as in the stage's own counters
  int sub_cyc = 0, sub_rd = 0, n_sub = 0, sub_err = 0, stall = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_valid && !m_ready) stall++;
    if (dut.go) begin sub_cyc <= 1; sub_rd <= 0; end
    else if (sub_cyc > 0) begin
      if (dut.rd_en) sub_rd <= sub_rd + 1;
      if (dut.sub_end) begin
        automatic int n = int'(cfg.cgroups) * 3136;
        n_sub++;
        if (sub_rd != n || sub_cyc > n + 16) begin
          sub_err++;
          $display("sub-stage: %0d reads in %0d clocks, expected %0d", sub_rd, sub_cyc, n);
        end
        sub_cyc <= 0;
      end else sub_cyc <= sub_cyc + 1;
    end
  end

  // output checker: samples the stream at the clock edge
  byte unsigned cur_q [$];
  bit cur_last [$];
  int out_i = 0, exp_n = 0;
  bit collecting = 0;
  always @(posedge clk) begin
    if (collecting && m_valid && m_ready) begin
      automatic bit ok = 1;
      for (int k = 0; k < 8; k++) ok &= (m_data[k*8 +: 8] == cur_q[out_i*8+k]);
      chk(ok, $sformatf("output beat %0d: %h", out_i, m_data));
      chk(m_last == cur_last[out_i*8+7], $sformatf("tlast of beat %0d", out_i));
      out_i++;
    end
    m_ready <= collecting && ($urandom_range(3) != 0);
  end

  task automatic send_bytes(ref byte unsigned b [$], input int port);
    for (int i = 0; i < b.size(); i += 8) begin
      logic [63:0] w = '0;
      for (int k = 0; k < 8; k++) if (i + k < b.size()) w[k*8 +: 8] = b[i+k];
      if (port == 0) begin w_v = 1; w_d = w; w_l = (i + 8 >= b.size()); end
      else           begin s_v = 1; s_d = w; s_l = (i + 8 >= b.size()); end
      @(posedge clk);
      while (!(port == 0 ? w_r : s_r)) @(posedge clk);
      @(negedge clk);
      if (port == 0) begin w_v = 0; w_l = 0; end else begin s_v = 0; s_l = 0; end
    end
  endtask

  task automatic run(input int nsp, input int ngb, input int nc, input int nf, input int dw_ch, input int npos,
                     input int blk, input bit pp, input int sh_in);
    int npairs = 3136 / npos, n_ch = nc * dw_ch, cgroups = dw_ch / 32;
    int n_filt = ngb * nf * 2 * npairs;
    logic [15:0] dwo [];
    logic signed [15:0] bn [];
    logic signed [7:0] sig [];
    logic [3:0] ex [];
    byte unsigned exp_q [$];
    bit exp_last [$];
    int unclamped = 0;
    dwo = new[nsp * n_ch * npos]; bn = new[n_filt * 3]; sig = new[n_filt * n_ch]; ex = new[n_filt * n_ch];
    foreach (dwo[i]) dwo[i] = 16'($urandom_range(6 << 13));
    for (int f = 0; f < n_filt; f++) begin
      bn[f*3] = 16'($urandom_range(6000) - 3000); bn[f*3+1] = 16'($urandom_range(120) - 40);
      bn[f*3+2] = 16'($urandom_range(200) - 50);
    end
    foreach (sig[i]) sig[i] = 8'($urandom());
    foreach (ex[i]) ex[i] = 4'($urandom());
    cfg.n_spatial = 16'(nsp); cfg.n_gblk = 16'(ngb); cfg.nc = 8'(nc); cfg.nf = 8'(nf); cfg.dw_ch = 8'(dw_ch);
    cfg.npos = 8'(npos); cfg.npairs = 7'(npairs); cfg.cgroups = 3'(cgroups); cfg.pw_blk_words = 10'(blk);
    cfg.pw_pingpong = pp; cfg.pw_sh = '{sh_in: 5'(sh_in), sh_mul: 5'd6, sh_out: 5'd0};
    // reference, in output order
    for (int t = 0; t < nsp; t++) for (int g = 0; g < ngb * nf; g++)
      for (int u = 0; u < 2; u++) for (int j = 0; j < npairs; j++) for (int pos = 0; pos < npos; pos++) begin
        int fi = g * 2 * npairs + u * npairs + j;
        int acc = 0;
        longint y;
        for (int kc = 0; kc < n_ch; kc++)
          acc += int'((longint'(dwo[(t * n_ch + kc) * npos + pos]) * longint'(sig[fi*n_ch + kc])) >>> ex[fi*n_ch + kc]);
        y = bn_ref(longint'(acc), bn[fi*3], bn[fi*3+1], bn[fi*3+2], cfg.pw_sh);
        y = (y < 0) ? 0 : (y > 192) ? 192 : y;
        if (y > 0 && y < 192) unclamped++;
        exp_q.push_back(byte'(y));
        exp_last.push_back(u == 1 && j == npairs - 1 && pos == npos - 1);
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    fork
      begin : bn_stream
        for (int g = 0; g < ngb * nf; g++) for (int j = 0; j < npairs; j++) begin
          int f0 = g * 2 * npairs + j, f1 = f0 + npairs;
          bn_v = 1; bn_d = {bn[f1*3+2], bn[f1*3+1], bn[f1*3], bn[f0*3+2], bn[f0*3+1], bn[f0*3]};
          @(negedge clk);
        end
        bn_v = 0;
      end
      for (int sh = 0; sh < 2; sh++) begin : w_streams
        automatic int port = sh;
        fork
          for (int gb = 0; gb < (pp ? ngb : 1); gb++) begin
            byte unsigned b [$];
            for (int c = 0; c < nc; c++) for (int f = 0; f < nf; f++) for (int cg = 0; cg < cgroups; cg++)
              for (int j = 0; j < npairs; j++) for (int u = 0; u < 2; u++) for (int l = 0; l < 32; l++) begin
                int fi = (gb * nf + f) * 2 * npairs + u * npairs + j, ch = c * dw_ch + cg * 32 + l;
                b.push_back(port ? byte'(ex[fi*n_ch + ch]) : byte'(sig[fi*n_ch + ch]));
              end
            send_bytes(b, port);
          end
        join_none
      end
      begin : dw_side
        for (int t = 0; t < nsp; t++) for (int gb = 0; gb < ngb; gb++) for (int c = 0; c < nc; c++) begin
          while (!m_start_dw) @(negedge clk);
          for (int ch = 0; ch < dw_ch; ch++) for (int pos = 0; pos < npos; pos++) begin
            dw_wvalid = 1; dw_waddr = 13'(((ch / 32) * npos + pos) * 32 + ch % 32);
            dw_wdata = dwo[(t * n_ch + c * dw_ch + ch) * npos + pos];
            dw_wlast = (ch == dw_ch - 1 && pos == npos - 1);
            @(negedge clk);
          end
          dw_wvalid = 0; dw_wlast = 0;
          @(negedge clk);
        end
      end
      begin : collect
        out_i = 0; exp_n = exp_q.size() / 8; cur_q = exp_q; cur_last = exp_last; collecting = 1;
        while (out_i < exp_n) @(negedge clk);
        collecting = 0;
      end
    join
    wait fork;
    repeat (30) @(negedge clk);
    chk(!busy, "idle after the stage");
    chk(unclamped > exp_q.size() / 20, $sformatf("%0d of %0d outputs inside (0,6)", unclamped, exp_q.size()));
  endtask

  initial begin
    cfg = '0; bn_d = '0; w_d = '0; s_d = '0; dw_waddr = '0; dw_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(2, 1, 1, 2, 32, 196, 32, 0, 15);     // nf = 2, two spatial tiles
    run(1, 2, 2, 1, 32, 196, 32, 1, 16);     // accumulation over two tiles, weight reload
    run(1, 2, 1, 1, 128, 49, 256, 1, 17);    // four channel groups, weight reload
    chk(n_sub == 4 + 4 + 2, $sformatf("%0d sub-stages", n_sub));
    chk(sub_err == 0, "sub-stage reads and time");
    chk(stall > 0, "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
