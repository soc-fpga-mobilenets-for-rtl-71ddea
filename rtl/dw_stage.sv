// MobileNets Depthwise stage: 3x3 depthwise convolution, Batch Norm and ReLU6
// over one IFM tile at a time, producing one OFM pixel per clock.
//
// Memories (simple dual-port block RAMs):
//   IFM-MEM1/2  ping-pong tile buffers, 64-bit write, 8-bit read, 16x16x32 pixels each
//   DW-MEM      all kernels of a stage, 72-bit write, 144-bit read (9 x 16-bit weights)
//   DW-BN-MEM   Batch Norm parameters of a stage, 96-bit write, 48-bit read (mu, p, beta)
// Datapath: DW image loader (with the window shift register) -> Conv (9 MACs)
// -> Batch Norm -> ReLU6 -> PW image loader, which hands each pixel with its
// pointwise-memory address to the pointwise stage.
//
// Control: while one IFM buffer is being convolved the other one is filled from
// the stream. A tile is started when its buffer has been filled (its tlast seen),
// the pointwise stage reports a free input buffer (m_start_dw) and the previous
// tile has left the pipeline. Kernels are addressed per stage: the c-th tile
// in depth of a stage uses kernels c*dw_ch .. c*dw_ch+dw_ch-1, with c counting
// tiles modulo nc. ifm_freed pulses when a buffer has been read out; the host
// may then send the next tile (the synchronisation signal).
// Timing: a tile of C channels with PHxPW padded pixels takes C*PH*PW clocks
// plus the pipeline latency (about 14 clocks).
// Weight and parameter streams are written from address 0 after each start.
// The memories, their widths and the ping-pong use of the tile buffers follow
// the architecture. The tile start condition, the kernel numbering across
// channel tiles and the tile storage order are this design's own choices.
module dw_stage
  import mbn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,          // pulse: new stage (clears pointers and flags)
  input  mbn_cfg_t            cfg,
  // depthwise weights, 72-bit words (after width conversion)
  input  logic                s_dww_valid,
  output logic                s_dww_ready,
  input  logic [71:0]         s_dww_data,
  // depthwise Batch Norm parameters, 96-bit words
  input  logic                s_dwbn_valid,
  output logic                s_dwbn_ready,
  input  logic [95:0]         s_dwbn_data,
  // IFM tiles, 64-bit words, tlast closes a tile
  input  logic                s_ifm_valid,
  output logic                s_ifm_ready,
  input  logic [AXIS_W-1:0]   s_ifm_data,
  input  logic                s_ifm_last,
  // permission from the pointwise stage
  input  logic                m_start_dw,
  // to the pointwise IFM memories
  output logic                pw_wvalid,
  output logic [12:0]         pw_waddr,
  output logic [DW_OUT_W-1:0] pw_wdata,
  output logic                pw_wlast,
  output logic                ifm_freed,
  output logic                busy
);
  // ---------------------------------------------------------------- memories
  logic [10:0] dww_ptr;
  logic [8:0]  dwbn_ptr;
  logic [9:0]  ifm_ptr;
  logic        wbuf, rbuf;
  logic [1:0]  ifm_full;

  assign s_dww_ready  = 1'b1;
  assign s_dwbn_ready = 1'b1;
  assign s_ifm_ready  = !ifm_full[wbuf];

  logic ifm_we;
  assign ifm_we = s_ifm_valid && s_ifm_ready;

  logic                 ld_busy, ld_done, ld_re;
  logic [12:0]          ld_raddr;
  logic [DW_PIX_W-1:0]  ifm_rdata [2];
  logic [9:0]           ch_addr, ch_addr_q;
  logic                 par_re;

  for (genvar b = 0; b < 2; b++) begin : g_ifm
    sdp_ram #(.WR_W(64), .RD_W(8), .WORDS(IFM_PIX / 8)) u_ifm_mem (
      .clk, .we(ifm_we && wbuf == 1'(b)), .waddr(ifm_ptr), .wdata(s_ifm_data),
      .re(ld_re && rbuf == 1'(b)), .raddr(ld_raddr), .rdata(ifm_rdata[b]));
  end

  logic [143:0] dw_rdata;
  logic [47:0]  bn_rdata;

  sdp_ram #(.WR_W(72), .RD_W(144), .WORDS(2 * DW_CH_MAX)) u_dw_mem (
    .clk, .we(s_dww_valid), .waddr(dww_ptr), .wdata(s_dww_data),
    .re(par_re), .raddr(ch_addr_q), .rdata(dw_rdata));

  sdp_ram #(.WR_W(96), .RD_W(48), .WORDS(DW_CH_MAX / 2)) u_dwbn_mem (
    .clk, .we(s_dwbn_valid), .waddr(dwbn_ptr), .wdata(s_dwbn_data),
    .re(par_re), .raddr(ch_addr_q), .rdata(bn_rdata));

  // ---------------------------------------------------------------- control
  logic       inflight, launch;
  logic [7:0] c_idx;
  logic [9:0] ch_base;

  assign launch = !ld_busy && !inflight && ifm_full[rbuf] && m_start_dw && !start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dww_ptr <= '0; dwbn_ptr <= '0; ifm_ptr <= '0;
      wbuf <= 1'b0; rbuf <= 1'b0; ifm_full <= '0;
      inflight <= 1'b0; c_idx <= '0; ch_base <= '0;
      ch_addr_q <= '0; par_re <= 1'b0;
    end else if (start) begin
      dww_ptr <= '0; dwbn_ptr <= '0; ifm_ptr <= '0;
      wbuf <= 1'b0; rbuf <= 1'b0; ifm_full <= '0;
      inflight <= 1'b0; c_idx <= '0; ch_base <= '0;
      par_re <= 1'b0;
    end else begin
      if (s_dww_valid)  dww_ptr  <= dww_ptr + 11'd1;
      if (s_dwbn_valid) dwbn_ptr <= dwbn_ptr + 9'd1;
      if (ifm_we) begin
        ifm_ptr <= s_ifm_last ? '0 : ifm_ptr + 10'd1;
        if (s_ifm_last) begin
          ifm_full[wbuf] <= 1'b1;
          wbuf <= ~wbuf;
        end
      end
      if (ld_done) begin
        ifm_full[rbuf] <= 1'b0;   // a write in the same clock is to the other buffer
        rbuf <= ~rbuf;
      end
      if (launch) begin
        inflight <= 1'b1;
        ch_base  <= 10'(c_idx) * 10'(cfg.dw_ch);
        c_idx    <= (c_idx + 8'd1 == cfg.nc) ? 8'd0 : c_idx + 8'd1;
      end
      if (pw_wvalid && pw_wlast) inflight <= 1'b0;
      // parameter reads trail the IFM read by one clock (see dw_image_loader)
      ch_addr_q <= ch_addr;
      par_re    <= ld_busy;
    end
  end

  assign ifm_freed = ld_done;
  assign busy      = inflight;

  // ---------------------------------------------------------------- datapath
  logic                       win_valid, win_last;
  logic [8:0][DW_PIX_W-1:0]   win;
  logic [7:0]                 win_ch, win_idx;
  logic                       launch_q, rd_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_q <= 1'b0;
      rd_sel   <= 1'b0;
    end else begin
      launch_q <= launch;
      rd_sel   <= rbuf;     // buffer the data returned this clock came from
    end
  end

  dw_image_loader u_loader (
    .clk, .rst_n, .start(launch_q),
    .in_h(cfg.in_h), .in_w(cfg.in_w), .pad(cfg.pad), .stride2(cfg.stride2),
    .n_ch(cfg.dw_ch), .ch_base(ch_base),
    .busy(ld_busy), .mem_done(ld_done),
    .mem_re(ld_re), .mem_raddr(ld_raddr), .mem_rdata(ifm_rdata[rd_sel]),
    .ch_addr(ch_addr),
    .win_valid, .win, .win_ch, .win_idx, .win_last);

  // Conv: tag = {BN parameters, channel, index, last}
  localparam int unsigned CT_W = 48 + 8 + 8 + 1;
  logic                    cv_valid;
  logic signed [ACC_W-1:0] cv_sum;
  logic [CT_W-1:0]         cv_tag;

  dw_conv #(.TAG_W(CT_W)) u_conv (
    .clk, .rst_n, .in_valid(win_valid), .in_pix(win), .in_wgt(dw_rdata),
    .in_tag({bn_rdata, win_ch, win_idx, win_last}),
    .out_valid(cv_valid), .out_sum(cv_sum), .out_tag(cv_tag));

  logic              bn_valid;
  logic signed [31:0] bn_y;
  logic [16:0]       bn_tag;

  batch_norm #(.TAG_W(17)) u_bn (
    .clk, .rst_n, .sh(cfg.dw_sh), .in_valid(cv_valid), .in_x(cv_sum),
    .in_par(bn_param_t'(cv_tag[CT_W-1 -: 48])), .in_tag(cv_tag[16:0]),
    .out_valid(bn_valid), .out_y(bn_y), .out_tag(bn_tag));

  logic                rl_valid;
  logic [DW_OUT_W-1:0] rl_y;
  logic [16:0]         rl_tag;

  relu6 #(.IN_W(32), .OUT_W(DW_OUT_W), .FRAC(DW_OUT_FRAC), .TAG_W(17)) u_relu (
    .clk, .rst_n, .in_valid(bn_valid), .in_x(bn_y), .in_tag(bn_tag),
    .out_valid(rl_valid), .out_y(rl_y), .out_tag(rl_tag));

  pw_image_loader u_pwld (
    .clk, .rst_n, .npos(cfg.npos),
    .in_valid(rl_valid), .in_pix(rl_y), .in_ch(rl_tag[16:9]), .in_idx(rl_tag[8:1]),
    .in_last(rl_tag[0]),
    .out_valid(pw_wvalid), .out_addr(pw_waddr), .out_pix(pw_wdata), .out_last(pw_wlast));
endmodule
