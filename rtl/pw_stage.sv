// MobileNets Pointwise stage: 1x1 convolution, Batch Norm and ReLU6, two
// output pixels per clock.
//
// Memories (simple dual-port block RAMs):
//   IFM-MEM3/4  ping-pong depthwise results, 16-bit write (from the PW image
//               loader, with address), 512-bit read = 32 pixels of one position
//   PW-MEM      weight significands, 64-bit write, 512-bit read (32 per MAC unit)
//   PS-MEM      weight exponents (scale factors), same organisation as PW-MEM
//   PW-BN-MEM   Batch Norm parameters, 96-bit words: one filter pair per word
//   ACC-MEM1/2  32-bit partial sums, 3136 entries, one per MAC unit
// followed by two Batch Norm + ReLU6 lanes and the Send Results unit.
//
// Work is organised in sub-stages. A sub-stage convolves the pixels in one
// IFM buffer (npos positions x cgroups groups of 32 channels) with one filter
// group of 2*npairs filters: MAC unit 1 computes filters 0..npairs-1 of the
// group and MAC unit 2 filters npairs..2*npairs-1. Per clock one position is
// read for one filter pair, in the order: channel group, pair, position.
// npos*npairs is 3136 for both tile shapes (196 x 16, 49 x 64), so a sub-stage
// issues cgroups*3136 reads, then waits for its pipeline to drain (16 clocks).
// Partial sums over the input-channel groups of a layer are kept in ACC-MEM
// (address pair*npos + position); the first group starts from zero and the
// last one passes its totals through Batch Norm and ReLU6 into the OFM memories.
//
// Stage walk (this design's encoding of the transfer schedule): for each
// spatial tile, for each block of nf filter groups, for each of the nc
// input-channel tiles, the depthwise result is used by nf consecutive
// sub-stages; the IFM buffer is then released. nf > 1 is meant for layers with
// a single input-channel tile (nc = 1), which need no accumulation.
// Weights are consumed sequentially from PW-MEM/PS-MEM, cgroups*npairs words
// per sub-stage; after pw_blk_words words the pointer returns to the start of the
// block. With pw_pingpong set the memories act as two halves of 256 words: the
// stream fills one half while the other is read, and a half is released when
// its block is used up. m_start_dw tells the depthwise stage that the IFM buffer
// it would write next is empty.
module pw_stage
  import mbn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,          // pulse: new stage
  input  mbn_cfg_t            cfg,
  // from the depthwise stage
  input  logic                dw_wvalid,
  input  logic [12:0]         dw_waddr,
  input  logic [DW_OUT_W-1:0] dw_wdata,
  input  logic                dw_wlast,
  output logic                m_start_dw,
  // pointwise Batch Norm parameters, 96-bit words
  input  logic                s_pwbn_valid,
  output logic                s_pwbn_ready,
  input  logic [95:0]         s_pwbn_data,
  // pointwise weight significands
  input  logic                s_pww_valid,
  output logic                s_pww_ready,
  input  logic [AXIS_W-1:0]   s_pww_data,
  input  logic                s_pww_last,
  // pointwise weight exponents
  input  logic                s_pws_valid,
  output logic                s_pws_ready,
  input  logic [AXIS_W-1:0]   s_pws_data,
  input  logic                s_pws_last,
  // OFM stream to the DMA
  output logic                m_ofm_valid,
  input  logic                m_ofm_ready,
  output logic [AXIS_W-1:0]   m_ofm_data,
  output logic                m_ofm_last,
  output logic                busy
);
  localparam int unsigned HALF_RD = PW_VALUES / 64 / 2;   // 256 read words per half
  localparam int unsigned HALF_WR = PW_VALUES / 8 / 2;    // 2048 write words per half

  // ------------------------------------------------------------ IFM-MEM3/4
  logic       iwbuf, irbuf;
  logic [1:0] ifull;
  logic       rd_en;
  logic [7:0] rd_ifm_word;
  logic [511:0] ifm_rdata [2];
  logic       rd_sel;

  for (genvar b = 0; b < 2; b++) begin : g_ifm
    sdp_ram #(.WR_W(16), .RD_W(512), .WORDS(PW_PIX_PER_BUF)) u_ifm_mem (
      .clk, .we(dw_wvalid && iwbuf == 1'(b)), .waddr(dw_waddr), .wdata(dw_wdata),
      .re(rd_en && irbuf == 1'(b)), .raddr(rd_ifm_word), .rdata(ifm_rdata[b]));
  end
  assign m_start_dw = !ifull[iwbuf];

  // ------------------------------------------------------------ PW/PS/BN memories
  logic [11:0] pww_ptr, pws_ptr;
  logic        pww_half, pws_half, rhalf;
  logic [1:0]  pwf, psf;
  logic [8:0]  rd_w_word;
  logic [8:0]  pwbn_ptr, rd_bn_word;
  logic [511:0] pw_rdata, ps_rdata;
  logic [95:0]  bn_rdata;

  assign s_pww_ready  = !pwf[pww_half];
  assign s_pws_ready  = !psf[pws_half];
  assign s_pwbn_ready = 1'b1;

  sdp_ram #(.WR_W(64), .RD_W(512), .WORDS(PW_VALUES / 8)) u_pw_mem (
    .clk, .we(s_pww_valid && s_pww_ready), .waddr(pww_ptr), .wdata(s_pww_data),
    .re(rd_en), .raddr(rd_w_word), .rdata(pw_rdata));

  sdp_ram #(.WR_W(64), .RD_W(512), .WORDS(PW_VALUES / 8)) u_ps_mem (
    .clk, .we(s_pws_valid && s_pws_ready), .waddr(pws_ptr), .wdata(s_pws_data),
    .re(rd_en), .raddr(rd_w_word), .rdata(ps_rdata));

  sdp_ram #(.WR_W(96), .RD_W(96), .WORDS(DW_CH_MAX / 2)) u_pwbn_mem (
    .clk, .we(s_pwbn_valid), .waddr(pwbn_ptr), .wdata(s_pwbn_data),
    .re(rd_en), .raddr(rd_bn_word), .rdata(bn_rdata));

  // ------------------------------------------------------------ sequencer
  typedef enum logic [1:0] {Q_IDLE, Q_ISSUE, Q_DRAIN} seq_e;
  seq_e        sq;
  logic [7:0]  pos;
  logic [6:0]  pj;
  logic [2:0]  cg;
  logic [7:0]  c_idx, f_idx;
  logic [15:0] gblk;
  logic [8:0]  w_ptr;          // word pointer inside the current block
  logic [8:0]  w_base;         // word of the sub-stage's first pair
  logic [8:0]  bn_base;
  logic        first_c, last_c;
  logic        ofm_free;
  logic        go, issue_end, sub_end;
  logic [8:0]  sub_words;

  assign sub_words = 9'(cfg.cgroups) * 9'(cfg.npairs);
  assign go = (sq == Q_IDLE) && !start && ifull[irbuf] && pwf[rhalf] && psf[rhalf]
              && (!last_c || ofm_free);
  assign issue_end = (sq == Q_ISSUE) && (pos == cfg.npos - 8'd1) && (pj == cfg.npairs - 7'd1)
                     && (cg == cfg.cgroups - 3'd1);
  assign rd_en = (sq == Q_ISSUE);
  assign rd_ifm_word = 8'(cg) * cfg.npos + pos;
  assign rd_w_word   = (cfg.pw_pingpong && rhalf ? 9'(HALF_RD) : 9'd0) + w_base
                       + 9'(cg) * 9'(cfg.npairs) + 9'(pj);
  assign rd_bn_word  = bn_base + 9'(pj);
  assign first_c = (c_idx == 8'd0);
  assign last_c  = (c_idx == cfg.nc - 8'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq <= Q_IDLE; pos <= '0; pj <= '0; cg <= '0;
      c_idx <= '0; f_idx <= '0; gblk <= '0; w_ptr <= '0; w_base <= '0; bn_base <= '0;
      iwbuf <= 1'b0; irbuf <= 1'b0; ifull <= '0;
      pww_ptr <= '0; pws_ptr <= '0; pww_half <= 1'b0; pws_half <= 1'b0; rhalf <= 1'b0;
      pwf <= '0; psf <= '0; pwbn_ptr <= '0; rd_sel <= 1'b0;
    end else if (start) begin
      sq <= Q_IDLE; pos <= '0; pj <= '0; cg <= '0;
      c_idx <= '0; f_idx <= '0; gblk <= '0; w_ptr <= '0; w_base <= '0; bn_base <= '0;
      iwbuf <= 1'b0; irbuf <= 1'b0; ifull <= '0;
      pww_ptr <= '0; pws_ptr <= '0; pww_half <= 1'b0; pws_half <= 1'b0; rhalf <= 1'b0;
      pwf <= '0; psf <= '0; pwbn_ptr <= '0;
    end else begin
      rd_sel <= irbuf;
      // ---- writes from the depthwise stage
      if (dw_wvalid && dw_wlast) begin
        ifull[iwbuf] <= 1'b1;
        iwbuf <= ~iwbuf;
      end
      // ---- parameter streams
      if (s_pwbn_valid) pwbn_ptr <= pwbn_ptr + 9'd1;
      if (s_pww_valid && s_pww_ready) begin
        if (s_pww_last) begin
          pwf[pww_half] <= 1'b1;
          pww_half <= cfg.pw_pingpong ? ~pww_half : 1'b0;
          pww_ptr  <= (cfg.pw_pingpong && !pww_half) ? 12'(HALF_WR) : 12'd0;
        end else pww_ptr <= pww_ptr + 12'd1;
      end
      if (s_pws_valid && s_pws_ready) begin
        if (s_pws_last) begin
          psf[pws_half] <= 1'b1;
          pws_half <= cfg.pw_pingpong ? ~pws_half : 1'b0;
          pws_ptr  <= (cfg.pw_pingpong && !pws_half) ? 12'(HALF_WR) : 12'd0;
        end else pws_ptr <= pws_ptr + 12'd1;
      end
      // ---- sub-stage sequencing
      unique case (sq)
        Q_IDLE: if (go) begin
          sq <= Q_ISSUE;
          pos <= '0; pj <= '0; cg <= '0;
          w_base  <= w_ptr;
          bn_base <= 9'((gblk * 16'(cfg.nf) + 16'(f_idx)) * 16'(cfg.npairs));
        end
        Q_ISSUE: begin
          if (pos == cfg.npos - 8'd1) begin
            pos <= '0;
            if (pj == cfg.npairs - 7'd1) begin
              pj <= '0;
              cg <= cg + 3'd1;
            end else pj <= pj + 7'd1;
          end else pos <= pos + 8'd1;
          if (issue_end) sq <= Q_DRAIN;
        end
        Q_DRAIN: if (sub_end) begin
          sq <= Q_IDLE;
          // weights
          if (w_ptr + sub_words == cfg.pw_blk_words) begin
            w_ptr <= '0;
            if (cfg.pw_pingpong) begin
              pwf[rhalf] <= 1'b0;
              psf[rhalf] <= 1'b0;
              rhalf <= ~rhalf;
            end
          end else w_ptr <= w_ptr + sub_words;
          // loops
          if (f_idx == cfg.nf - 8'd1) begin
            f_idx <= '0;
            ifull[irbuf] <= 1'b0;
            irbuf <= ~irbuf;
            if (last_c) begin
              c_idx <= '0;
              gblk  <= (gblk == cfg.n_gblk - 16'd1) ? 16'd0 : gblk + 16'd1;
            end else c_idx <= c_idx + 8'd1;
          end else f_idx <= f_idx + 8'd1;
        end
        default: sq <= Q_IDLE;
      endcase
    end
  end
  assign busy = (sq != Q_IDLE);

  // ------------------------------------------------------------ MAC units
  // sideband of a read: acc address, first, last group, end of sub-stage
  logic        r_v, r_first, r_last, r_end;
  logic [11:0] r_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_v <= 1'b0;
    else        r_v <= rd_en && !start;
  end
  always_ff @(posedge clk) begin
    r_first <= first_c && (cg == 3'd0);
    r_last  <= last_c && (cg == cfg.cgroups - 3'd1);
    r_end   <= issue_end;
    r_addr  <= 12'(pj) * 12'(cfg.npos) + 12'(pos);
  end

  localparam int unsigned MT_W = 96 + 2;   // BN parameters of the pair, last group, end
  logic              mv [2];
  logic signed [31:0] msum [2];
  logic [11:0]       maddr [2];
  logic [MT_W-1:0]   mtag [2];
  logic              acc_re [2];
  logic [11:0]       acc_raddr [2];
  logic signed [31:0] acc_rdata [2];

  for (genvar u = 0; u < 2; u++) begin : g_mac
    logic [PW_LANES-1:0][PW_SIG_W-1:0] sig;
    logic [PW_LANES-1:0][PW_EXP_W-1:0] ex;
    for (genvar l = 0; l < PW_LANES; l++) begin : g_lane
      assign sig[l] = pw_rdata[(u*PW_LANES + l)*8 +: 8];
      assign ex[l]  = ps_rdata[(u*PW_LANES + l)*8 +: PW_EXP_W];
    end

    pw_mac #(.ADDR_W(12), .TAG_W(MT_W)) u_mac (
      .clk, .rst_n, .in_valid(r_v), .in_pix(ifm_rdata[rd_sel]), .in_sig(sig), .in_exp(ex),
      .in_first(r_first), .in_addr(r_addr), .in_tag({bn_rdata, r_last, r_end}),
      .acc_re(acc_re[u]), .acc_raddr(acc_raddr[u]), .acc_rdata(acc_rdata[u]),
      .out_valid(mv[u]), .out_sum(msum[u]), .out_addr(maddr[u]), .out_tag(mtag[u]));

    // ACC-MEM: partial sums of the groups before the last
    sdp_ram #(.WR_W(32), .RD_W(32), .WORDS(ACC_DEPTH)) u_acc_mem (
      .clk, .we(mv[u] && !mtag[u][1]), .waddr(maddr[u]), .wdata(msum[u]),
      .re(acc_re[u]), .raddr(acc_raddr[u]), .rdata(acc_rdata[u]));
  end

  // ------------------------------------------------------------ Batch Norm + ReLU6
  logic              bv [2];
  logic signed [31:0] by [2];
  logic [12:0]       btag [2];
  logic              rv [2];
  logic [PW_OUT_W-1:0] ry [2];
  logic [12:0]       rtag [2];

  for (genvar u = 0; u < 2; u++) begin : g_post
    batch_norm #(.TAG_W(13)) u_bn (
      .clk, .rst_n, .sh(cfg.pw_sh), .in_valid(mv[u] && mtag[u][1]), .in_x(msum[u]),
      .in_par(bn_param_t'(mtag[u][2 + u*48 +: 48])), .in_tag({maddr[u], mtag[u][0]}),
      .out_valid(bv[u]), .out_y(by[u]), .out_tag(btag[u]));

    relu6 #(.IN_W(32), .OUT_W(PW_OUT_W), .FRAC(PW_OUT_FRAC), .TAG_W(13)) u_relu (
      .clk, .rst_n, .in_valid(bv[u]), .in_x(by[u]), .in_tag(btag[u]),
      .out_valid(rv[u]), .out_y(ry[u]), .out_tag(rtag[u]));
  end

  // end of a sub-stage: its last result has been written (ACC or OFM memory)
  logic set_done, set_free_w;
  assign sub_end  = (mv[0] && !mtag[0][1] && mtag[0][0]) || (rv[0] && rtag[0][0]);
  assign set_done = rv[0] && rtag[0][0];
  assign ofm_free = set_free_w;

  send_results u_send (
    .clk, .rst_n, .start,
    .n_bytes(12'(cfg.npos) * 12'(cfg.npairs)),
    .wvalid(rv[0]), .waddr(rtag[0][12:1]), .wdata_a(ry[0]), .wdata_b(ry[1]),
    .set_done(set_done), .set_free(set_free_w),
    .m_valid(m_ofm_valid), .m_ready(m_ofm_ready), .m_data(m_ofm_data), .m_last(m_ofm_last));

  // both MAC units run in lockstep
  assert property (@(posedge clk) disable iff (!rst_n) mv[0] == mv[1]);
  // ACC-MEM holds one filter group: several groups per tile need nc = 1
  assert property (@(posedge clk) disable iff (!rst_n) go |-> (cfg.nf == 1 || cfg.nc == 1));
endmodule
