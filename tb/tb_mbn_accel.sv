// End-to-end test of the accelerator: eight complete stages at the real tile
// shapes of MobileNets, run back to back through the single input stream.
//
//   A  16x16x32 tiles, host-padded, stride 1, 2 filter groups per depthwise
//      result (64 filters), 2 spatial tiles, weights loaded once (first layer shape)
//   B  14x14x32 tiles padded in hardware (full), 2 input-channel tiles
//      accumulated, 2 filter-group blocks with ping-pong weight reload (layers 7-11)
//   C  14x14x32 tiles, half padding in hardware, stride 2, 128 filters per
//      group (49 positions x 64 pairs), 2 input-channel tiles (layer 12 shape)
//   D  7x7x128 tiles padded in hardware, 4 channel groups per pointwise tile,
//      2 filter-group blocks with ping-pong reload (layer 13 shape)
//   E  layer 13 at full size: 7x7x1024 in, 1024 filters, 8 channel tiles x
//      8 filter-group blocks, 64 weight blocks of 16,384 values
//   F  layers 7-11 at full size: 14x14x512 in, 512 filters, 16 channel tiles
//      x 16 filter-group blocks, 16 weight blocks
//   G  layer 12 at full size: 14x14x512 in, stride 2, 1024 filters, 16
//      channel tiles x 8 filter-group blocks, 32 weight blocks
//   H  layer 3 at full size: 56x56x128 in as 16 host-padded spatial tiles,
//      4 channel tiles x 4 filter-group blocks, one resident weight block
//
// A host process streams weights, Batch Norm parameters, weight blocks and IFM
// tiles in the order the stream connector expects; the output stream is
// compared beat by beat with a reference computed here in plain integer
// arithmetic (depthwise convolution, Batch Norm, ReLU6, pointwise convolution
// with significand/exponent weights, Batch Norm, ReLU6). The output side
// drops tready at random. Mechanism counters (stream stalls on full buffers,
// weight reloads, ping-pong switches, accumulation, hardware padding, stride 2,
// output back-pressure, channel groups) must all be non-zero. Sub-stage
// timing is checked: a depthwise tile takes C*PH*PW clocks plus at most 20, a
// pointwise sub-stage issues exactly cgroups*npos*npairs reads and drains in at
// most 20 more clocks.
// Stage shapes follow the reference's tiling; A-D use fewer channels to exercise
// corner cases quickly, E to H are complete layers of the network.
module tb_mbn_accel;
  import mbn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mbn_cfg_t cfg;
  logic start = 1'b0;
  logic s_valid = 1'b0, s_ready, s_last = 1'b0;
  logic [63:0] s_data = '0;
  logic m_valid, m_ready = 1'b0, m_last;
  logic [63:0] m_data;
  logic ifm_sync, stream_done, busy;

  mbn_accel dut (
    .clk, .rst_n, .cfg, .start,
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data), .s_axis_tlast(s_last),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data), .m_axis_tlast(m_last),
    .ifm_sync, .stream_done, .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ watchdog
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ stage data
  int n_ch;                   // depthwise kernels of the stage
  int n_filt;                 // pointwise filters of the stage
  int ph, pwid, oh, ow;       // padded tile, output tile
  int unsigned seed;
  logic signed [15:0] dww [];      // [ch*9 + k]
  logic signed [15:0] dwbn [];     // [ch*3 + {0 mu,1 p,2 beta}]
  logic signed [15:0] pwbn [];     // [f*3 + ..]
  logic signed [7:0]  sig [];      // [f*n_ch + ch]
  logic [3:0]         ex [];       // [f*n_ch + ch]
  logic [7:0]         ifm [];      // [((t*nc + c)*dw_ch + ch)*in_h*in_w + r*in_w + col]
  logic [15:0]        dwo [];      // [((t*nc + c)*dw_ch + ch)*npos + pos]
  byte unsigned       exp_q [$];   // expected output bytes
  bit                 exp_last [$];// tlast expected after this byte (per beat end)

  function automatic longint bn_ref(longint x, int mu, int p, int beta, bn_shift_t sh);
    longint d, m, a;
    d = (x >>> sh.sh_in) - longint'(mu);
    m = d * longint'(p);
    a = (m >>> sh.sh_mul) + longint'(beta);
    return longint'(int'(a >>> sh.sh_out));   // 32-bit result
  endfunction

  function automatic int relu_ref(longint y, int frac);
    if (y < 0) return 0;
    if (y > (longint'(6) << frac)) return 6 << frac;
    return int'(y);
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // ------------------------------------------------------------------ stream queue
  logic [63:0] beat_q [$];
  bit          blast_q [$];

  task automatic push_bytes(ref byte unsigned b [$]);
    int n = b.size();
    for (int i = 0; i < n; i += 8) begin
      logic [63:0] w = '0;
      for (int k = 0; k < 8; k++) if (i + k < n) w[k*8 +: 8] = b[i+k];
      beat_q.push_back(w);
      blast_q.push_back(i + 8 >= n);
    end
  endtask

  // Weight block k: words k*pw_blk_words .. of the order in which the
  // pointwise stage reads them (filter-group block, channel tile, filter
  // group, channel group, pair); each word holds 32 channels of filter j
  // followed by 32 channels of filter j + npairs.
  task automatic push_pw_block(int k, bit shifts);
    byte unsigned b [$];
    int blk = cfg.pw_blk_words;
    for (int w = k * blk; w < (k + 1) * blk; w++) begin
      int j  = w % cfg.npairs;
      int cg = (w / cfg.npairs) % cfg.cgroups;
      int f  = (w / (cfg.npairs * cfg.cgroups)) % cfg.nf;
      int c  = (w / (cfg.npairs * cfg.cgroups * cfg.nf)) % cfg.nc;
      int gb = w / (cfg.npairs * cfg.cgroups * cfg.nf * cfg.nc);
      for (int u = 0; u < 2; u++)
        for (int l = 0; l < 32; l++) begin
          int fi = (gb * cfg.nf + f) * 2 * cfg.npairs + u * cfg.npairs + j;
          int ch = c * cfg.dw_ch + cg * 32 + l;
          b.push_back(shifts ? byte'(ex[fi*n_ch + ch]) : byte'(sig[fi*n_ch + ch]));
        end
    end
    push_bytes(b);
  endtask

  // ------------------------------------------------------------------ one stage
  int m_stall_cnt = 0;
  int dw_err_t = 0, pw_err_t = 0;

  task automatic run_stage(input string name);
    byte unsigned b [$];
    int n_tiles, tsz, k_ifm, reload_no;
    int unclamped = 0, out_bytes = 0;

    n_ch   = cfg.nc * cfg.dw_ch;
    n_filt = cfg.n_gblk * cfg.nf * 2 * cfg.npairs;
    unique case (cfg.pad)
      PAD_FULL: begin ph = cfg.in_h + 2; pwid = cfg.in_w + 2; end
      PAD_HALF: begin ph = cfg.in_h + 1; pwid = cfg.in_w + 1; end
      default:  begin ph = cfg.in_h;     pwid = cfg.in_w;     end
    endcase
    oh = cfg.stride2 ? (ph - 3) / 2 + 1 : ph - 2;
    ow = cfg.stride2 ? (pwid - 3) / 2 + 1 : pwid - 2;
    check(oh * ow == cfg.npos, {name, ": npos matches the tile"});

    dww  = new[n_ch * 9];
    dwbn = new[n_ch * 3];
    pwbn = new[n_filt * 3];
    sig  = new[n_filt * n_ch];
    ex   = new[n_filt * n_ch];
    foreach (dww[i])  dww[i]  = 16'(rnd(-300, 300));
    for (int ch = 0; ch < n_ch; ch++) begin
      dwbn[ch*3+0] = 16'(rnd(-2000, 2000));
      dwbn[ch*3+1] = 16'(rnd(-200, 400));
      dwbn[ch*3+2] = 16'(rnd(-3000, 9000));
    end
    for (int f = 0; f < n_filt; f++) begin
      pwbn[f*3+0] = 16'(rnd(-3000, 3000));
      pwbn[f*3+1] = 16'(rnd(-40, 80));
      pwbn[f*3+2] = 16'(rnd(-50, 150));
    end
    foreach (sig[i]) sig[i] = 8'(rnd(-128, 127));
    foreach (ex[i])  ex[i]  = 4'(rnd(0, 15));
    tsz     = cfg.in_h * cfg.in_w * cfg.dw_ch;
    n_tiles = cfg.n_spatial * cfg.nc;
    ifm = new[n_tiles * tsz];
    foreach (ifm[i]) ifm[i] = 8'($urandom_range(255));

    // ---- reference: depthwise
    dwo = new[n_tiles * cfg.dw_ch * cfg.npos];
    for (int t = 0; t < n_tiles; t++)
      for (int ch = 0; ch < cfg.dw_ch; ch++) begin
        int kc = (t % cfg.nc) * cfg.dw_ch + ch;
        for (int orow = 0; orow < oh; orow++)
          for (int ocol = 0; ocol < ow; ocol++) begin
            longint s = 0;
            for (int k = 0; k < 9; k++) begin
              int pr = (cfg.stride2 ? 2 * orow : orow) + k / 3;
              int pc = (cfg.stride2 ? 2 * ocol : ocol) + k % 3;
              int off = (cfg.pad == PAD_FULL) ? 1 : 0;
              int r = pr - off, cc = pc - off;
              int px = 0;
              if (r >= 0 && r < cfg.in_h && cc >= 0 && cc < cfg.in_w)
                px = ifm[(t * cfg.dw_ch + ch) * cfg.in_h * cfg.in_w + r * cfg.in_w + cc];
              s += longint'(px) * longint'(dww[kc*9+k]);
            end
            dwo[(t * cfg.dw_ch + ch) * cfg.npos + orow * ow + ocol] = 16'(relu_ref(
              bn_ref(longint'(int'(s)), dwbn[kc*3], dwbn[kc*3+1], dwbn[kc*3+2], cfg.dw_sh),
              DW_OUT_FRAC));
          end
      end

    // ---- reference: pointwise, in output-stream order
    exp_q.delete(); exp_last.delete();
    for (int t = 0; t < cfg.n_spatial; t++)
      for (int gb = 0; gb < cfg.n_gblk; gb++)
        for (int f = 0; f < cfg.nf; f++) begin
          int g = gb * cfg.nf + f;
          for (int u = 0; u < 2; u++)
            for (int j = 0; j < cfg.npairs; j++)
              for (int pos = 0; pos < cfg.npos; pos++) begin
                int fi = g * 2 * cfg.npairs + u * cfg.npairs + j;
                int acc = 0;
                int y;
                for (int c = 0; c < cfg.nc; c++)
                  for (int ch = 0; ch < cfg.dw_ch; ch++) begin
                    int kc = c * cfg.dw_ch + ch;
                    int p  = dwo[((t * cfg.nc + c) * cfg.dw_ch + ch) * cfg.npos + pos];
                    acc += int'((longint'(p) * longint'(sig[fi*n_ch + kc])) >>> ex[fi*n_ch + kc]);
                  end
                y = relu_ref(bn_ref(longint'(acc), pwbn[fi*3], pwbn[fi*3+1], pwbn[fi*3+2], cfg.pw_sh),
                             PW_OUT_FRAC);
                if (y > 0 && y < 192) unclamped++;
                exp_q.push_back(byte'(y));
                exp_last.push_back(u == 1 && j == cfg.npairs - 1 && pos == cfg.npos - 1);
              end
        end
    check(unclamped > exp_q.size() / 20, $sformatf("%s: %0d of %0d outputs inside (0,6)", name,
          unclamped, exp_q.size()));

    // ---- input stream
    beat_q.delete(); blast_q.delete();
    b.delete();
    for (int ch = 0; ch < n_ch; ch++) for (int k = 0; k < 9; k++) begin
      b.push_back(byte'(dww[ch*9+k])); b.push_back(byte'(dww[ch*9+k] >> 8));
    end
    push_bytes(b);
    b.delete();
    for (int i = 0; i < n_ch * 3; i++) begin b.push_back(byte'(dwbn[i])); b.push_back(byte'(dwbn[i] >> 8)); end
    push_bytes(b);
    b.delete();
    for (int g = 0; g < cfg.n_gblk * cfg.nf; g++)
      for (int j = 0; j < cfg.npairs; j++)
        for (int u = 0; u < 2; u++)
          for (int q = 0; q < 3; q++) begin
            int fi = g * 2 * cfg.npairs + u * cfg.npairs + j;
            b.push_back(byte'(pwbn[fi*3+q])); b.push_back(byte'(pwbn[fi*3+q] >> 8));
          end
    push_bytes(b);
    push_pw_block(0, 0);
    push_pw_block(0, 1);
    k_ifm = 0; reload_no = 0;
    for (int t = 0; t < cfg.n_spatial; t++)
      for (int gb = 0; gb < cfg.n_gblk; gb++)
        for (int c = 0; c < cfg.nc; c++) begin
          if (k_ifm > 0 && reload_no < cfg.pw_reloads &&
              k_ifm == cfg.pw_first + reload_no * cfg.pw_period) begin
            reload_no++;
            push_pw_block(reload_no, 0);
            push_pw_block(reload_no, 1);
          end
          b.delete();
          for (int i = 0; i < tsz; i++) b.push_back(ifm[(t * cfg.nc + c) * tsz + i]);
          push_bytes(b);
          k_ifm++;
        end
    check(k_ifm == cfg.n_ifm, {name, ": IFM transfer count"});

    // ---- run
    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    fork
      begin : drive
        while (beat_q.size() > 0) begin
          s_valid <= 1'b1; s_data <= beat_q[0]; s_last <= blast_q[0];
          @(posedge clk);
          if (s_ready) begin void'(beat_q.pop_front()); void'(blast_q.pop_front()); end
        end
        s_valid <= 1'b0; s_last <= 1'b0;
      end
      begin : collect
        int nb = exp_q.size() / 8;
        for (int i = 0; i < nb; i++) begin
          bit ok = 1;
          m_ready <= ($urandom_range(3) != 0);
          @(posedge clk);
          while (!(m_valid && m_ready)) begin
            if (m_valid && !m_ready) m_stall_cnt++;
            m_ready <= ($urandom_range(3) != 0);
            @(posedge clk);
          end
          for (int k = 0; k < 8; k++) begin
            if (m_data[k*8 +: 8] != exp_q[i*8+k]) begin
              ok = 0;
              if (failures < 10)
                $display("%s beat %0d byte %0d: got %0d expected %0d", name, i, k,
                         m_data[k*8 +: 8], exp_q[i*8+k]);
            end
          end
          check(ok, $sformatf("%s: output beat %0d", name, i));
          check(m_last == exp_last[i*8+7], $sformatf("%s: tlast of beat %0d", name, i));
          out_bytes += 8;
        end
        m_ready <= 1'b0;
      end
    join
    repeat (30) @(posedge clk);
    check(!busy, {name, ": idle after the stage"});
    check(out_bytes == exp_q.size(), {name, ": output length"});
    $display("%s: %0d output bytes, %0d inside (0,6)", name, out_bytes, unclamped);
  endtask

  // ------------------------------------------------------------------ mechanism counters
  int n_ifm_stall = 0, n_reload = 0, n_half_sw = 0, n_acc_rd = 0, n_pad_full = 0,
      n_pad_half = 0, n_stride2 = 0, n_ofm_sw = 0, n_cgroups = 0, n_multi_f = 0, n_pw_stall = 0;
  logic rhalf_q, rset_q;
  int dw_cyc = 0, pw_cyc = 0, pw_issue = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_conn.state == 3'd6 && s_valid && !s_ready) n_ifm_stall++;
    if ((dut.u_conn.state == 3'd4 || dut.u_conn.state == 3'd5) && s_valid && !s_ready) n_pw_stall++;
    if (dut.u_dw.launch) begin
      if (cfg.pad == PAD_FULL) n_pad_full++;
      if (cfg.pad == PAD_HALF) n_pad_half++;
      if (cfg.stride2) n_stride2++;
    end
    if (dut.u_pw.go) begin
      if (cfg.cgroups > 1) n_cgroups++;
      if (cfg.nf > 1) n_multi_f++;
    end
    rhalf_q <= dut.u_pw.rhalf;
    rset_q  <= dut.u_pw.u_send.rset;
    if (rhalf_q != dut.u_pw.rhalf) n_half_sw++;
    if (rset_q != dut.u_pw.u_send.rset) n_ofm_sw++;
    if (dut.u_pw.acc_re[0]) n_acc_rd++;
    if (dut.u_conn.state == 3'd6 && s_valid && s_ready && s_last && dut.u_conn.reloads_done < cfg.pw_reloads
        && dut.u_conn.ifm_cnt + 1 == dut.u_conn.next_reload) n_reload++;
    // depthwise tile time: launch to last result
    if (dut.u_dw.launch) dw_cyc <= 1;
    else if (dw_cyc > 0) begin
      if (dut.u_dw.pw_wvalid && dut.u_dw.pw_wlast) begin
        int budget;
        budget = int'(cfg.dw_ch) * ph * pwid;
        if (dw_cyc < budget || dw_cyc > budget + 20) begin
          dw_err_t++;
          $display("depthwise tile took %0d clocks, budget %0d", dw_cyc, budget);
        end
        dw_cyc <= 0;
      end else dw_cyc <= dw_cyc + 1;
    end
    // pointwise sub-stage time
    if (dut.u_pw.go) begin pw_cyc <= 1; pw_issue <= 0; end
    else if (pw_cyc > 0) begin
      if (dut.u_pw.rd_en) pw_issue <= pw_issue + 1;
      if (dut.u_pw.sub_end) begin
        int n;
        n = int'(cfg.cgroups) * cfg.npos * cfg.npairs;
        if (pw_issue != n || pw_cyc > n + 20) begin
          pw_err_t++;
          $display("pointwise sub-stage: %0d reads in %0d clocks, expected %0d", pw_issue, pw_cyc, n);
        end
        pw_cyc <= 0;
      end else pw_cyc <= pw_cyc + 1;
    end
  end

  // ------------------------------------------------------------------ stages
  function automatic mbn_cfg_t base_cfg();
    mbn_cfg_t c = '0;
    c.dw_sh = '{sh_in: 5'd2, sh_mul: 5'd7, sh_out: 5'd0};
    c.pw_sh = '{sh_in: 5'd15, sh_mul: 5'd6, sh_out: 5'd0};
    c.dw_ch = 8'd32; c.cgroups = 3'd1; c.pw_period = 16'd1;
    return c;
  endfunction

  initial begin
    cfg = base_cfg();
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // A: first-layer shape
    cfg = base_cfg();
    cfg.in_h = 16; cfg.in_w = 16; cfg.pad = PAD_NONE; cfg.stride2 = 0;
    cfg.n_spatial = 2; cfg.n_gblk = 1; cfg.nc = 1; cfg.nf = 2;
    cfg.npos = 196; cfg.npairs = 16; cfg.pw_blk_words = 32; cfg.pw_pingpong = 0;
    cfg.n_ifm = 2; cfg.pw_first = 0; cfg.pw_reloads = 0;
    run_stage("A");

    // B: layers 7-11 shape
    cfg = base_cfg();
    cfg.in_h = 14; cfg.in_w = 14; cfg.pad = PAD_FULL; cfg.stride2 = 0;
    cfg.n_spatial = 1; cfg.n_gblk = 2; cfg.nc = 2; cfg.nf = 1;
    cfg.npos = 196; cfg.npairs = 16; cfg.pw_blk_words = 32; cfg.pw_pingpong = 1;
    cfg.n_ifm = 4; cfg.pw_first = 1; cfg.pw_period = 2; cfg.pw_reloads = 1;
    cfg.pw_sh.sh_in = 16;
    run_stage("B");

    // C: layer 12 shape
    cfg = base_cfg();
    cfg.in_h = 14; cfg.in_w = 14; cfg.pad = PAD_HALF; cfg.stride2 = 1;
    cfg.n_spatial = 1; cfg.n_gblk = 1; cfg.nc = 2; cfg.nf = 1;
    cfg.npos = 49; cfg.npairs = 64; cfg.pw_blk_words = 128; cfg.pw_pingpong = 0;
    cfg.n_ifm = 2; cfg.pw_reloads = 0;
    cfg.pw_sh.sh_in = 16;
    run_stage("C");

    // D: layer 13 shape
    cfg = base_cfg();
    cfg.in_h = 7; cfg.in_w = 7; cfg.pad = PAD_FULL; cfg.stride2 = 0; cfg.dw_ch = 128;
    cfg.n_spatial = 1; cfg.n_gblk = 2; cfg.nc = 1; cfg.nf = 1; cfg.cgroups = 4;
    cfg.npos = 49; cfg.npairs = 64; cfg.pw_blk_words = 256; cfg.pw_pingpong = 1;
    cfg.n_ifm = 2; cfg.pw_first = 1; cfg.pw_period = 1; cfg.pw_reloads = 1;
    cfg.pw_sh.sh_in = 17;
    run_stage("D");

    // E: stage 13 at full size, 7x7x1024 -> 1024 filters, one weight block
    // of 16,384 values per (filter group, channel tile)
    cfg = base_cfg();
    cfg.in_h = 7; cfg.in_w = 7; cfg.pad = PAD_FULL; cfg.stride2 = 0; cfg.dw_ch = 128;
    cfg.n_spatial = 1; cfg.n_gblk = 8; cfg.nc = 8; cfg.nf = 1; cfg.cgroups = 4;
    cfg.npos = 49; cfg.npairs = 64; cfg.pw_blk_words = 256; cfg.pw_pingpong = 1;
    cfg.n_ifm = 64; cfg.pw_first = 1; cfg.pw_period = 1; cfg.pw_reloads = 63;
    cfg.pw_sh.sh_in = 18;
    run_stage("E");

    // F: stages 7-11 at full size, 14x14x512 -> 512 filters, one weight block
    // of 16,384 values per group of 32 filters
    cfg = base_cfg();
    cfg.in_h = 14; cfg.in_w = 14; cfg.pad = PAD_FULL; cfg.stride2 = 0;
    cfg.n_spatial = 1; cfg.n_gblk = 16; cfg.nc = 16; cfg.nf = 1;
    cfg.npos = 196; cfg.npairs = 16; cfg.pw_blk_words = 256; cfg.pw_pingpong = 1;
    cfg.n_ifm = 256; cfg.pw_first = 16; cfg.pw_period = 16; cfg.pw_reloads = 15;
    cfg.pw_sh.sh_in = 18;
    run_stage("F");

    // G: stage 12 at full size, 14x14x512 in, stride 2, 1024 filters in 8
    // groups of 128, one weight block of 16,384 values per 4 channel tiles
    cfg = base_cfg();
    cfg.in_h = 14; cfg.in_w = 14; cfg.pad = PAD_HALF; cfg.stride2 = 1;
    cfg.n_spatial = 1; cfg.n_gblk = 8; cfg.nc = 16; cfg.nf = 1;
    cfg.npos = 49; cfg.npairs = 64; cfg.pw_blk_words = 256; cfg.pw_pingpong = 1;
    cfg.n_ifm = 128; cfg.pw_first = 4; cfg.pw_period = 4; cfg.pw_reloads = 31;
    cfg.pw_sh.sh_in = 18;
    run_stage("G");

    // H: stage 3 at full size, 56x56x128 in as 16 host-padded 16x16 tiles,
    // 128 filters in 4 groups of 32, the whole weight set in one block
    cfg = base_cfg();
    cfg.in_h = 16; cfg.in_w = 16; cfg.pad = PAD_NONE; cfg.stride2 = 0;
    cfg.n_spatial = 16; cfg.n_gblk = 4; cfg.nc = 4; cfg.nf = 1;
    cfg.npos = 196; cfg.npairs = 16; cfg.pw_blk_words = 256; cfg.pw_pingpong = 0;
    cfg.n_ifm = 256; cfg.pw_first = 0; cfg.pw_reloads = 0;
    cfg.pw_sh.sh_in = 16;
    run_stage("H");

    check(dw_err_t == 0, "depthwise tile timing");
    check(pw_err_t == 0, "pointwise sub-stage timing");
    $display("mechanisms: ifm_stall=%0d pw_stall=%0d reload=%0d half_switch=%0d acc_reads=%0d pad_full=%0d pad_half=%0d stride2=%0d ofm_switch=%0d cgroups=%0d multi_filter_groups=%0d out_backpressure=%0d",
             n_ifm_stall, n_pw_stall, n_reload, n_half_sw, n_acc_rd, n_pad_full, n_pad_half, n_stride2,
             n_ofm_sw, n_cgroups, n_multi_f, m_stall_cnt);
    check(n_ifm_stall > 0, "IFM stream stalled on full ping-pong buffers");
    check(n_reload > 0,    "pointwise weight reload");
    check(n_half_sw > 0,   "PW-MEM half switch");
    check(n_acc_rd > 0,    "accumulation over input-channel tiles");
    check(n_pad_full > 0,  "hardware full padding");
    check(n_pad_half > 0,  "hardware half padding");
    check(n_stride2 > 0,   "stride 2");
    check(n_ofm_sw > 0,    "OFM set ping-pong");
    check(n_cgroups > 0,   "several channel groups per pointwise tile");
    check(n_multi_f > 0,   "several filter groups per depthwise result");
    check(m_stall_cnt > 0, "output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
