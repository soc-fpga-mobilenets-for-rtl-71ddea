// Depthwise stage test. For three tile shapes of the network (16x16 without
// padding; 14x14 with half padding and stride 2; 7x7x128 with full padding)
// the kernels, Batch Norm parameters and several IFM tiles are streamed in,
// and every pixel handed to the pointwise memories (address and value) is
// compared with an integer model of convolution, Batch Norm and ReLU6 followed
// by the pointwise address mapping. Also checked: one pw_wlast per tile on its
// final pixel, the tile waits while m_start_dw is low, the IFM stream stalls
// while both tile buffers are full, and with m_start_dw high a tile takes
// C*PH*PW clocks plus at most 52 (the 8,244-clock budget for 8,192 pixels).
// The 8,244-clock sub-stage budget is the reference figure; the data layouts are this design's.
module tb_dw_stage;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mbn_cfg_t cfg;
  logic start = 0, dww_v = 0, dww_r, dwbn_v = 0, dwbn_r, ifm_v = 0, ifm_r, ifm_l = 0, m_start_dw = 0;
  logic [71:0] dww_d;
  logic [95:0] dwbn_d;
  logic [63:0] ifm_d;
  logic pw_wvalid, pw_wlast, ifm_freed, busy;
  logic [12:0] pw_waddr;
  logic [15:0] pw_wdata;

  dw_stage dut (.clk, .rst_n, .start, .cfg, .s_dww_valid(dww_v), .s_dww_ready(dww_r), .s_dww_data(dww_d),
    .s_dwbn_valid(dwbn_v), .s_dwbn_ready(dwbn_r), .s_dwbn_data(dwbn_d), .s_ifm_valid(ifm_v),
    .s_ifm_ready(ifm_r), .s_ifm_data(ifm_d), .s_ifm_last(ifm_l), .m_start_dw, .pw_wvalid, .pw_waddr,
    .pw_wdata, .pw_wlast, .ifm_freed, .busy);

  initial begin
    repeat (400000) @(posedge clk);
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

  // expected writes per tile: address -> value, in tile order
  int exp_val [$][int];
  int cyc = 0, tiles_out = 0, n_wr = 0, wlast_t [$], ifm_stall = 0, start_wait = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (ifm_v && !ifm_r) ifm_stall++;
    if (!m_start_dw && !dut.ld_busy && dut.ifm_full[dut.rbuf]) start_wait++;
    if (pw_wvalid) begin
      n_wr++;
      if (exp_val.size() == 0) chk(0, "write after the last tile");
      else begin
        chk(exp_val[0].exists(int'(pw_waddr)), $sformatf("tile %0d: unexpected address %0d", tiles_out, pw_waddr));
        if (exp_val[0].exists(int'(pw_waddr))) begin
          chk(int'(pw_wdata) == exp_val[0][int'(pw_waddr)],
              $sformatf("tile %0d addr %0d: %0d vs %0d", tiles_out, pw_waddr, pw_wdata, exp_val[0][int'(pw_waddr)]));
          exp_val[0].delete(int'(pw_waddr));
        end
        chk(pw_wlast == (exp_val[0].size() == 0), $sformatf("tile %0d: pw_wlast", tiles_out));
        if (pw_wlast) begin void'(exp_val.pop_front()); tiles_out++; wlast_t.push_back(cyc); end
      end
    end
  end

  task automatic run(input int h, input int w, input pad_e pm, input bit s2, input int dw_ch, input int nc,
                     input int ntile, input bit rand_start);
    int ph, pw, oh, ow, npos, n_ch, tsz, off;
    logic signed [15:0] k [];
    logic signed [15:0] bn [];
    logic [7:0] img [];
    ph = h + (pm == PAD_FULL ? 2 : pm == PAD_HALF ? 1 : 0);
    pw = w + (pm == PAD_FULL ? 2 : pm == PAD_HALF ? 1 : 0);
    off = (pm == PAD_FULL) ? 1 : 0;
    oh = s2 ? (ph - 3) / 2 + 1 : ph - 2;
    ow = s2 ? (pw - 3) / 2 + 1 : pw - 2;
    npos = oh * ow; n_ch = dw_ch * nc; tsz = h * w * dw_ch;
    k = new[n_ch * 9]; bn = new[n_ch * 3]; img = new[ntile * tsz];
    foreach (k[i]) k[i] = 16'($urandom_range(600) - 300);
    for (int c = 0; c < n_ch; c++) begin
      bn[c*3] = 16'($urandom_range(4000) - 2000); bn[c*3+1] = 16'($urandom_range(600) - 200);
      bn[c*3+2] = 16'($urandom_range(12000) - 3000);
    end
    foreach (img[i]) img[i] = 8'($urandom());
    for (int t = 0; t < ntile; t++) begin
      int m [int];
      for (int ch = 0; ch < dw_ch; ch++) begin
        int kc = (t % nc) * dw_ch + ch;
        for (int orow = 0; orow < oh; orow++)
          for (int ocol = 0; ocol < ow; ocol++) begin
            longint s = 0, y;
            for (int q = 0; q < 9; q++) begin
              int r = (s2 ? 2 * orow : orow) + q / 3 - off, c = (s2 ? 2 * ocol : ocol) + q % 3 - off;
              if (r >= 0 && r < h && c >= 0 && c < w)
                s += longint'(img[t * tsz + (ch * h + r) * w + c]) * longint'(k[kc*9+q]);
            end
            y = bn_ref(longint'(int'(s)), bn[kc*3], bn[kc*3+1], bn[kc*3+2], cfg.dw_sh);
            y = (y < 0) ? 0 : (y > (6 << 13)) ? (6 << 13) : y;
            m[((ch / 32) * npos + orow * ow + ocol) * 32 + ch % 32] = int'(y);
          end
      end
      exp_val.push_back(m);
    end
    cfg.in_h = 5'(h); cfg.in_w = 5'(w); cfg.pad = pm; cfg.stride2 = s2; cfg.dw_ch = 8'(dw_ch);
    cfg.nc = 8'(nc); cfg.npos = 8'(npos);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int c = 0; c < n_ch; c++) for (int half = 0; half < 2; half++) begin
      dww_v = 1;
      dww_d = '0;
      dww_d = half ? {k[c*9+8], k[c*9+7], k[c*9+6], k[c*9+5], k[c*9+4][15:8]}
                   : {k[c*9+4][7:0], k[c*9+3], k[c*9+2], k[c*9+1], k[c*9]};
      @(negedge clk);
    end
    dww_v = 0;
    for (int c = 0; c < n_ch; c += 2) begin
      dwbn_v = 1;
      dwbn_d = {bn[c*3+5], bn[c*3+4], bn[c*3+3], bn[c*3+2], bn[c*3+1], bn[c*3]};
      @(negedge clk);
    end
    dwbn_v = 0;
    fork
      for (int t = 0; t < ntile; t++)
        for (int i = 0; i < tsz; i += 8) begin
          ifm_v = 1; ifm_l = (i + 8 >= tsz);
          for (int b = 0; b < 8; b++) ifm_d[b*8 +: 8] = img[t * tsz + i + b];
          do @(posedge clk); while (!ifm_r);
          @(negedge clk);
          ifm_v = 0; ifm_l = 0;
        end
      while (exp_val.size() > 0) begin
        m_start_dw = rand_start ? ($urandom_range(7) != 0) : 1'b1;
        @(negedge clk);
      end
    join
    repeat (5) @(negedge clk);
    chk(!busy, "idle after the last tile");
    if (!rand_start) begin
      int budget = dw_ch * ph * pw;
      for (int i = 2; i < wlast_t.size(); i++)
        chk(wlast_t[i] - wlast_t[i-1] >= budget && wlast_t[i] - wlast_t[i-1] <= budget + 52,
            $sformatf("tile period %0d for %0d pixels", wlast_t[i] - wlast_t[i-1], budget));
    end
    wlast_t.delete();
  endtask

  initial begin
    cfg = '0;
    cfg.dw_sh = '{sh_in: 5'd2, sh_mul: 5'd7, sh_out: 5'd0};
    dww_d = '0; dwbn_d = '0; ifm_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(16, 16, PAD_NONE, 0, 32, 2, 4, 1);
    run(14, 14, PAD_HALF, 1, 32, 1, 3, 0);
    run(7, 7, PAD_FULL, 0, 128, 1, 2, 1);
    run(16, 16, PAD_NONE, 0, 32, 1, 5, 0);
    chk(tiles_out == 14, $sformatf("%0d tiles out", tiles_out));
    chk(ifm_stall > 0, "IFM stream stalled on full buffers");
    chk(start_wait > 0, "a full tile waited for m_start_dw");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
