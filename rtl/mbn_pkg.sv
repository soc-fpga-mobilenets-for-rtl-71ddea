// Shared constants and types of the MobileNets depthwise-separable accelerator.
//
// The accelerator runs one depthwise + pointwise stage of MobileNets at a time on
// data streamed in over a 64-bit AXI4-Stream port.  The numbers below are the
// sizes of the on-chip memories and datapaths of the main configuration
// (16x16x32 depthwise tile, 9 depthwise MACs, 2 x 32 pointwise MACs, 12-bit
// pointwise weights made of an 8-bit significand and a 4-bit exponent).
// The per-stage configuration record is this design's own choice: it gathers
// the counts the control units need to walk one stage (how the host programs them
// is left open by the architecture, so here they are plain input signals).
package mbn_pkg;

  // ---- stream ----------------------------------------------------------
  localparam int unsigned AXIS_W      = 64;   // DMA stream width

  // ---- depthwise stage -------------------------------------------------
  localparam int unsigned DW_PIX_W    = 8;    // depthwise input pixel (unsigned)
  localparam int unsigned DW_WGT_W    = 16;   // depthwise weight (signed)
  localparam int unsigned DW_OUT_W    = 16;   // depthwise OFM pixel, unsigned Q3.13
  localparam int unsigned DW_OUT_FRAC = 13;
  localparam int unsigned TILE_MAX    = 16;   // largest tile row (16x16 incl. padding)
  localparam int unsigned TILE_CH     = 32;   // channels of a standard tile
  localparam int unsigned IFM_PIX     = TILE_MAX * TILE_MAX * TILE_CH;   // 8192
  localparam int unsigned DW_CH_MAX   = 1024; // depthwise kernels of one stage
  localparam int unsigned BN_W        = 16;   // Batch Norm parameter width
  localparam int unsigned ACC_W       = 32;   // accumulator / BN input width
  localparam int unsigned SH_W        = 5;    // alignment shift amount width

  // ---- pointwise stage -------------------------------------------------
  localparam int unsigned PW_LANES    = 32;   // MACs per pointwise MAC unit
  localparam int unsigned PW_SIG_W    = 8;    // pointwise weight significand
  localparam int unsigned PW_EXP_W    = 4;    // pointwise weight biased exponent
  localparam int unsigned PW_PIX_PER_BUF = 6272; // 14x14x32 pixels per IFM-MEM3/4
  localparam int unsigned PW_VALUES   = 32768;   // PW-MEM / PS-MEM capacity in 8-bit values
  localparam int unsigned ACC_DEPTH   = 3136;    // ACC-MEM / OFM-MEM entries
  localparam int unsigned PW_OUT_W    = 8;    // pointwise OFM pixel, unsigned Q3.5
  localparam int unsigned PW_OUT_FRAC = 5;

  typedef enum logic [1:0] {
    PAD_NONE = 2'd0,   // tile already padded by the host
    PAD_FULL = 2'd1,   // one zero row/column on every side (stride 1)
    PAD_HALF = 2'd2    // one zero row at the bottom, one zero column at the right (stride 2)
  } pad_e;

  // Batch Norm alignment shifts: before the subtraction, before the addition
  // and before ReLU6.
  typedef struct packed {
    logic [SH_W-1:0] sh_in;
    logic [SH_W-1:0] sh_mul;
    logic [SH_W-1:0] sh_out;
  } bn_shift_t;

  // Batch Norm parameters of one channel, y = ((x - mu) * p) + beta.
  typedef struct packed {
    logic signed [BN_W-1:0] beta;
    logic signed [BN_W-1:0] p;
    logic signed [BN_W-1:0] mu;
  } bn_param_t;

  // Per-stage configuration.
  typedef struct packed {
    // depthwise tile
    logic [4:0]  in_h;          // stored tile height (<= 16)
    logic [4:0]  in_w;          // stored tile width  (<= 16)
    pad_e        pad;           // padding applied while loading the shift register
    logic        stride2;       // depthwise stride 2
    logic [7:0]  dw_ch;         // channels per tile (32, or 128 for 7x7 tiles)
    bn_shift_t   dw_sh;
    // loop counts of one stage
    logic [15:0] n_spatial;     // spatial tiles
    logic [15:0] n_gblk;        // filter-group blocks per spatial tile
    logic [7:0]  nc;            // input-channel groups (tiles in depth)
    logic [7:0]  nf;            // pointwise filter groups served by one depthwise result
    // pointwise sub-stage
    logic [7:0]  npos;          // pixel positions per pointwise tile (196 or 49)
    logic [6:0]  npairs;        // filter pairs per filter group (16 or 64)
    logic [2:0]  cgroups;       // 32-channel groups per pointwise tile (1..4)
    logic [9:0]  pw_blk_words;  // 512-bit PW-MEM words per parameter block
    logic        pw_pingpong;   // PW-MEM/PS-MEM used as two halves
    bn_shift_t   pw_sh;
    // stream connector schedule
    logic [15:0] n_ifm;         // IFM transfers in the stage (N_IFM x S_IFM)
    logic [15:0] pw_first;      // IFM transfer index preceded by the first parameter reload
    logic [15:0] pw_period;     // IFM transfers between reloads
    logic [15:0] pw_reloads;    // number of reloads in the stage
  } mbn_cfg_t;

endpackage
