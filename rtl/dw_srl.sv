// Reconfigurable shift register (SRL) that forms 3x3 convolution windows.
//
// Pixels of one channel enter row by row, one per shift. With a row length
// of W pixels, the last 2*W+3 pixels hold three complete rows' worth of the
// window, so a fixed set of taps gives the 3x3 window P1..P9 ending at the
// newest pixel. The register holds 2*MAX_W+3 = 35 pixels for 16-pixel rows;
// multiplexers pick the taps of the second and third window rows according to
// the configured row length, so tiles of any width up to MAX_W (for example
// 16 or 9) use the same registers.
// Tap k (row-major, 0 = top-left) of the window is the pixel that entered
// (2-r)*W + (2-c) shifts ago, r = k/3, c = k%3. The window is combinational
// from the registers; it is a whole window only once the loader has pushed at
// least two rows and three pixels of the channel.
// From the architecture: 35 registers for 16-pixel rows and multiplexed taps
// for smaller tiles. Selecting the taps directly from the row length (rather
// than through four fixed multiplexers) is this design's own choice.
module dw_srl #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned MAX_W = 16
) (
  input  logic                  clk,
  input  logic                  shift,
  input  logic [PIX_W-1:0]      din,
  input  logic [4:0]            row_w,     // row length in pixels, 3..MAX_W
  output logic [8:0][PIX_W-1:0] win
);
  localparam int unsigned LEN = 2 * MAX_W + 3;

  logic [PIX_W-1:0] sr [LEN];

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0] <= din;
      for (int i = 1; i < LEN; i++) sr[i] <= sr[i-1];
    end
  end

  // Tap multiplexers.
  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        win[r*3+c] = sr[6'((2-r)) * 6'(row_w) + 6'((2-c))];
  end
endmodule
