// DW image loader test. A behavioural IFM memory (one-clock read) holds a
// random tile; for random shapes (1..16 pixels a side after padding), padding
// modes (none, full, half) and strides, every window produced is compared
// with a model that pads the tile in software and slides a 3x3 window over
// it. Also checked: window order, win_ch, win_idx, win_last on the final
// window only, the kernel address (delayed twice, as the parameter memories
// see it) matching the window's channel, mem_done once per tile, and the tile
// time of C*PH*PW clocks (one padded pixel per clock).
// The padding placement and one-pixel-per-clock rate follow this design's loader.
module tb_dw_image_loader;
  import mbn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, stride2 = 0, busy, mem_done, mem_re, win_valid, win_last;
  logic [4:0] in_h, in_w;
  pad_e pad;
  logic [7:0] n_ch, win_ch, win_idx;
  logic [9:0] ch_base, ch_addr, ch_q1, ch_q2;
  logic [12:0] mem_raddr;
  logic [7:0] mem_rdata;
  logic [8:0][7:0] win;

  dw_image_loader dut (.clk, .rst_n, .start, .in_h, .in_w, .pad, .stride2, .n_ch, .ch_base, .busy,
    .mem_done, .mem_re, .mem_raddr, .mem_rdata, .ch_addr, .win_valid, .win, .win_ch, .win_idx, .win_last);

  logic [7:0] mem [8192];
  always_ff @(posedge clk) begin
    if (mem_re) mem_rdata <= mem[mem_raddr];
    ch_q1 <= ch_addr;
    ch_q2 <= ch_q1;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  typedef struct { logic [8:0][7:0] w; int ch; int idx; } win_t;
  win_t exp_q [$];
  int n_done = 0, t_start = 0, t_done = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n) begin
    if (mem_done) begin n_done++; t_done = cyc; end
    if (win_valid) begin
      if (exp_q.size() == 0) chk(0, "unexpected window");
      else begin
        automatic win_t e = exp_q.pop_front();
        chk(win == e.w, $sformatf("window ch %0d idx %0d", e.ch, e.idx));
        chk(win_ch == 8'(e.ch) && win_idx == 8'(e.idx), $sformatf("tag %0d/%0d vs %0d/%0d", win_ch, win_idx, e.ch, e.idx));
        chk(win_last == (exp_q.size() == 0), $sformatf("win_last %0d with %0d left (ch %0d idx %0d)", win_last, exp_q.size(), e.ch, e.idx));
        chk(ch_q2 == ch_base + 10'(e.ch), "kernel address");
      end
    end
  end

  task automatic run_tile(input int h, input int w, input pad_e pm, input bit s2, input int c);
    int ph, pw, off, total;
    logic [7:0] img [][][];
    ph = h + (pm == PAD_FULL ? 2 : pm == PAD_HALF ? 1 : 0);
    pw = w + (pm == PAD_FULL ? 2 : pm == PAD_HALF ? 1 : 0);
    off = (pm == PAD_FULL) ? 1 : 0;
    img = new[c];
    total = 0;
    for (int k = 0; k < c; k++) begin
      img[k] = new[ph];
      for (int r = 0; r < ph; r++) begin
        img[k][r] = new[pw];
        for (int q = 0; q < pw; q++) begin
          if (r < off || r >= off + h || q < off || q >= off + w) img[k][r][q] = 0;
          else begin img[k][r][q] = 8'($urandom()); mem[total] = img[k][r][q]; total++; end
        end
      end
      begin
        automatic int idx = 0;
        for (int r = 0; r + 3 <= ph; r += (s2 ? 2 : 1))
          for (int q = 0; q + 3 <= pw; q += (s2 ? 2 : 1)) begin
            automatic win_t e;
            for (int i = 0; i < 9; i++) e.w[i] = img[k][r + i / 3][q + i % 3];
            e.ch = k; e.idx = idx++;
            exp_q.push_back(e);
          end
      end
    end
    @(negedge clk);
    in_h = 5'(h); in_w = 5'(w); pad = pm; stride2 = s2; n_ch = 8'(c); ch_base = 10'($urandom_range(900));
    start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    wait (!busy);
    repeat (4) @(negedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d windows missing (%0dx%0d pad %0d s%0d)", exp_q.size(), h, w, pm, s2));
    chk(t_done - t_start == c * ph * pw, $sformatf("tile time %0d for %0d pixels", t_done - t_start, c * ph * pw));
    exp_q.delete();
  endtask

  initial begin
    in_h = 0; in_w = 0; pad = PAD_NONE; n_ch = 0; ch_base = 0; mem_rdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the shapes of the stages: 16x16 unpadded, 14x14 full, 14x14 half + stride 2, 7x7 full
    run_tile(16, 16, PAD_NONE, 0, 4);
    run_tile(15, 15, PAD_NONE, 1, 3);
    run_tile(14, 14, PAD_FULL, 0, 3);
    run_tile(14, 14, PAD_HALF, 1, 3);
    run_tile(7, 7, PAD_FULL, 0, 5);
    run_tile(7, 7, PAD_HALF, 1, 5);
    for (int n = 0; n < 25; n++) begin
      automatic pad_e pm = pad_e'($urandom_range(2));
      automatic int lim = (pm == PAD_FULL) ? 14 : (pm == PAD_HALF) ? 15 : 16;
      automatic int lo = (pm == PAD_FULL) ? 1 : (pm == PAD_HALF) ? 2 : 3;
      run_tile($urandom_range(lo, lim), $urandom_range(lo, lim), pm, 1'($urandom_range(1)), $urandom_range(1, 4));
    end
    chk(n_done == 31, $sformatf("mem_done pulsed %0d times", n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
