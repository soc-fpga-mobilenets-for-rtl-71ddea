// MobileNets depthwise-separable stage accelerator (programmable-logic part).
//
// The accelerator executes the 13 depthwise + pointwise stages of MobileNets
// for a host processor, which keeps the first convolution, pooling, the fully
// connected layer and softmax, and which moves data with a DMA engine. All data
// arrive on one 64-bit AXI4-Stream input and all results leave on one 64-bit
// AXI4-Stream output:
//
//   s_axis -> Stream Connector -+-> width converter 64->72 -> DW weights  --+
//                               +-> width converter 64->96 -> DW BN        --+-> Depthwise stage
//                               +-> IFM tiles (64 bit)                     --+        |
//                               +-> width converter 64->96 -> PW BN        --+        | pixels + address
//                               +-> PW weights (64 bit)                    --+-> Pointwise stage -> m_axis
//                               +-> PW shifts  (64 bit)                    --+
//
// The depthwise stage convolves one tile (up to 16x16x32 pixels) with 9 MACs
// per clock, applies Batch Norm and ReLU6 and writes its results, reordered by
// depth, into the pointwise stage's IFM memory. The pointwise stage multiplies
// 32 channels of a pixel by two filters per clock (64 MACs) with 12-bit
// custom floating-point weights, accumulates over input-channel tiles,
// applies Batch Norm and ReLU6 and streams 8-bit OFM pixels out. Ping-pong
// buffers between all parts let transfers and both stages overlap.
//
// Interface: cfg describes the stage and must be stable from start until the
// stage's last OFM beat has left; start (one clock) begins a stage and resets
// the control state of every unit. ifm_sync pulses each time an IFM buffer
// has been consumed, which is when the host may send the next tile. How the
// host sets cfg is outside this unit.
// The block structure, widths and stream layout follow the reference
// architecture. The configuration struct, the start pulse and back-pressure as
// the flow control are this design's own choices.
module mbn_accel
  import mbn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mbn_cfg_t          cfg,
  input  logic              start,
  // DMA MM2S stream
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic [AXIS_W-1:0] s_axis_tdata,
  input  logic              s_axis_tlast,
  // DMA S2MM stream
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic [AXIS_W-1:0] m_axis_tdata,
  output logic              m_axis_tlast,
  // status
  output logic              ifm_sync,
  output logic              stream_done,
  output logic              busy
);
  logic [5:0]        sc_valid, sc_ready;
  logic [AXIS_W-1:0] sc_data;
  logic              sc_last, sc_busy;

  stream_connector u_conn (
    .clk, .rst_n, .start,
    .n_ifm(cfg.n_ifm), .pw_first(cfg.pw_first), .pw_period(cfg.pw_period),
    .pw_reloads(cfg.pw_reloads),
    .s_valid(s_axis_tvalid), .s_ready(s_axis_tready), .s_data(s_axis_tdata), .s_last(s_axis_tlast),
    .m_valid(sc_valid), .m_ready(sc_ready), .m_data(sc_data), .m_last(sc_last),
    .stage_done(stream_done), .busy(sc_busy));

  // width converters (their tlast is not used: the memories behind them are
  // written from address 0 after each start)
  logic        dww_v, dww_r, dwbn_v, dwbn_r, pwbn_v, pwbn_r;
  logic [71:0] dww_d;
  logic [95:0] dwbn_d, pwbn_d;

  axis_width_conv #(.IN_B(8), .OUT_B(9)) u_dwc_dww (
    .clk, .rst_n, .s_valid(sc_valid[0]), .s_ready(sc_ready[0]), .s_data(sc_data), .s_last(sc_last),
    .m_valid(dww_v), .m_ready(dww_r), .m_data(dww_d), .m_last());
  axis_width_conv #(.IN_B(8), .OUT_B(12)) u_dwc_dwbn (
    .clk, .rst_n, .s_valid(sc_valid[1]), .s_ready(sc_ready[1]), .s_data(sc_data), .s_last(sc_last),
    .m_valid(dwbn_v), .m_ready(dwbn_r), .m_data(dwbn_d), .m_last());
  axis_width_conv #(.IN_B(8), .OUT_B(12)) u_dwc_pwbn (
    .clk, .rst_n, .s_valid(sc_valid[2]), .s_ready(sc_ready[2]), .s_data(sc_data), .s_last(sc_last),
    .m_valid(pwbn_v), .m_ready(pwbn_r), .m_data(pwbn_d), .m_last());

  logic        pw_wvalid, pw_wlast, m_start_dw, dw_busy, pw_busy;
  logic [12:0] pw_waddr;
  logic [DW_OUT_W-1:0] pw_wdata;

  dw_stage u_dw (
    .clk, .rst_n, .start, .cfg,
    .s_dww_valid(dww_v), .s_dww_ready(dww_r), .s_dww_data(dww_d),
    .s_dwbn_valid(dwbn_v), .s_dwbn_ready(dwbn_r), .s_dwbn_data(dwbn_d),
    .s_ifm_valid(sc_valid[5]), .s_ifm_ready(sc_ready[5]), .s_ifm_data(sc_data), .s_ifm_last(sc_last),
    .m_start_dw,
    .pw_wvalid, .pw_waddr, .pw_wdata, .pw_wlast,
    .ifm_freed(ifm_sync), .busy(dw_busy));

  pw_stage u_pw (
    .clk, .rst_n, .start, .cfg,
    .dw_wvalid(pw_wvalid), .dw_waddr(pw_waddr), .dw_wdata(pw_wdata), .dw_wlast(pw_wlast),
    .m_start_dw,
    .s_pwbn_valid(pwbn_v), .s_pwbn_ready(pwbn_r), .s_pwbn_data(pwbn_d),
    .s_pww_valid(sc_valid[3]), .s_pww_ready(sc_ready[3]), .s_pww_data(sc_data), .s_pww_last(sc_last),
    .s_pws_valid(sc_valid[4]), .s_pws_ready(sc_ready[4]), .s_pws_data(sc_data), .s_pws_last(sc_last),
    .m_ofm_valid(m_axis_tvalid), .m_ofm_ready(m_axis_tready), .m_ofm_data(m_axis_tdata),
    .m_ofm_last(m_axis_tlast), .busy(pw_busy));

  assign busy = sc_busy || dw_busy || pw_busy;
endmodule
