// DW image loader: reads one depthwise tile from the IFM memory and feeds the
// 3x3 window shift register, one pixel per clock.
//
// Channel by channel, it walks the padded tile row by row. Pixels inside the
// stored tile are read from the IFM memory (stored planar: channel, row,
// column, so a running read pointer suffices); pixels in the padding are
// replaced by zeros, so the zero padding costs no memory (full padding: one
// zero border all round; half padding: one zero row at the bottom and one zero
// column at the right). Every pushed pixel whose window lies inside the padded
// tile, and which matches the stride, produces a window for the Conv unit.
//
// Timing: a pixel issued at clock t is read at t+1 and enters the shift register
// at the end of t+1. Its window, win_valid and the tag are presented at t+2. The
// weight and Batch Norm memories are read with ch_addr, which follows the issued
// pixel, so their data (also one clock latency) line up with the window.
// A tile of C channels of PHxPW padded pixels takes C*PH*PW clocks. mem_done
// pulses when the last pixel has been read, which frees the IFM buffer.
module dw_image_loader
  import mbn_pkg::*;
#(
  parameter int unsigned MAX_W = TILE_MAX,
  parameter int unsigned RA_W  = $clog2(IFM_PIX),
  parameter int unsigned CA_W  = $clog2(DW_CH_MAX)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,     // pulse: begin a tile (ignored while busy)
  input  logic [4:0]                 in_h,
  input  logic [4:0]                 in_w,
  input  pad_e                       pad,
  input  logic                       stride2,
  input  logic [7:0]                 n_ch,      // channels in the tile
  input  logic [CA_W-1:0]            ch_base,   // first kernel index of the tile
  output logic                       busy,
  output logic                       mem_done,
  // IFM memory read port
  output logic                       mem_re,
  output logic [RA_W-1:0]            mem_raddr,
  input  logic [DW_PIX_W-1:0]        mem_rdata,
  // kernel index for the weight / Batch Norm memories
  output logic [CA_W-1:0]            ch_addr,
  // windows
  output logic                       win_valid,
  output logic [8:0][DW_PIX_W-1:0]   win,
  output logic [7:0]                 win_ch,    // channel within the tile
  output logic [7:0]                 win_idx,   // output pixel index within the channel
  output logic                       win_last   // last window of the tile
);
  logic [4:0] ph, pw, off;
  always_comb begin
    unique case (pad)
      PAD_FULL: begin ph = in_h + 5'd2; pw = in_w + 5'd2; off = 5'd1; end
      PAD_HALF: begin ph = in_h + 5'd1; pw = in_w + 5'd1; off = 5'd0; end
      default:  begin ph = in_h;        pw = in_w;        off = 5'd0; end
    endcase
  end

  // ---- issue stage ------------------------------------------------------
  logic [7:0] ch;
  logic [4:0] r, c;
  logic [RA_W-1:0] ptr;
  logic is_pad, is_last, is_last_win;
  logic [4:0] r_lw, c_lw;     // position of the last window's bottom-right pixel

  assign is_pad  = (r < off) || (r >= off + in_h) || (c < off) || (c >= off + in_w);
  assign is_last = (ch == n_ch - 8'd1) && (r == ph - 5'd1) && (c == pw - 5'd1);
  // with stride 2 an even padded size leaves the last row / column unused
  assign r_lw = stride2 ? ((ph - 5'd1) & ~5'd1) : ph - 5'd1;
  assign c_lw = stride2 ? ((pw - 5'd1) & ~5'd1) : pw - 5'd1;
  assign is_last_win = (ch == n_ch - 8'd1) && (r == r_lw) && (c == c_lw);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ch <= '0; r <= '0; c <= '0; ptr <= '0;
    end else if (!busy) begin
      if (start) begin
        busy <= 1'b1;
        ch <= '0; r <= '0; c <= '0; ptr <= '0;
      end
    end else begin
      if (!is_pad) ptr <= ptr + 1'b1;
      if (c == pw - 5'd1) begin
        c <= '0;
        if (r == ph - 5'd1) begin
          r <= '0;
          ch <= ch + 8'd1;
          if (is_last) busy <= 1'b0;
        end else begin
          r <= r + 5'd1;
        end
      end else begin
        c <= c + 5'd1;
      end
    end
  end

  assign mem_re    = busy && !is_pad;
  assign mem_raddr = ptr;
  assign ch_addr   = ch_base + CA_W'(ch);
  assign mem_done  = busy && is_last;

  // ---- read stage -------------------------------------------------------
  logic       s1_v, s1_pad, s1_win, s1_last, s1_first;
  logic [7:0] s1_ch, idx_cnt;

  // Output index: windows counted from the first pixel of each channel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v    <= 1'b0;
      idx_cnt <= '0;
    end else begin
      s1_v <= busy;
      if (s1_v) begin
        if (s1_first)    idx_cnt <= '0;
        else if (s1_win) idx_cnt <= idx_cnt + 8'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    s1_pad   <= is_pad;
    s1_ch    <= ch;
    s1_last  <= is_last_win;
    s1_first <= (r == 5'd0) && (c == 5'd0);
    s1_win   <= (r >= 5'd2) && (c >= 5'd2) && (!stride2 || (!r[0] && !c[0]));
  end

  dw_srl #(.PIX_W(DW_PIX_W), .MAX_W(MAX_W)) u_srl (
    .clk   (clk),
    .shift (s1_v),
    .din   (s1_pad ? '0 : mem_rdata),
    .row_w (pw),
    .win   (win)
  );

  // ---- window stage -----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= s1_v && s1_win;
  end

  always_ff @(posedge clk) begin
    win_ch   <= s1_ch;
    win_idx  <= idx_cnt;
    win_last <= s1_last;
  end
endmodule
