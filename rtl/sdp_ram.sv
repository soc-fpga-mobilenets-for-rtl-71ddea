// Simple dual-port block RAM with independent write and read widths.
//
// All on-chip memories of the accelerator (IFM, weight, Batch Norm,
// accumulator and OFM memories) are simple dual-port RAMs whose read port may be
// wider or narrower than the write port, as the FPGA block RAMs allow.
// Storage is an array of UNIT_W-bit words, UNIT_W being the narrower of the two
// ports. A write stores WR_W/UNIT_W consecutive units at unit address
// waddr*WR_W/UNIT_W, least significant unit first; a read returns RD_W/UNIT_W
// consecutive units the same way. Reads are synchronous (one cycle latency,
// rdata is held when re is low). Reading an address in the cycle it is written
// returns the old contents. WR_W and RD_W must be multiples of each other.
// The memories' widths and depths follow the architecture; the architecture uses
// the FPGA vendor's block RAM generator, which this array replaces. Read-before-
// write and the unit order inside a wide word are this design's choices.
module sdp_ram #(
  parameter int unsigned WR_W   = 64,
  parameter int unsigned RD_W   = 8,
  parameter int unsigned WORDS  = 1024,                       // depth in write words
  parameter int unsigned UNIT_W = (WR_W < RD_W) ? WR_W : RD_W,
  parameter int unsigned UNITS  = WORDS * WR_W / UNIT_W,
  parameter int unsigned WA_W   = (WORDS > 1) ? $clog2(WORDS) : 1,
  parameter int unsigned RA_W   = (UNITS * UNIT_W / RD_W > 1) ? $clog2(UNITS * UNIT_W / RD_W) : 1
) (
  input  logic            clk,
  input  logic            we,
  input  logic [WA_W-1:0] waddr,
  input  logic [WR_W-1:0] wdata,
  input  logic            re,
  input  logic [RA_W-1:0] raddr,
  output logic [RD_W-1:0] rdata
);
  localparam int unsigned WR_U = WR_W / UNIT_W;
  localparam int unsigned RD_U = RD_W / UNIT_W;
  localparam int unsigned UA_W = (UNITS > 1) ? $clog2(UNITS) : 1;

  logic [UNIT_W-1:0] mem [UNITS];

  initial begin
    assert (WR_W % UNIT_W == 0 && RD_W % UNIT_W == 0)
      else $error("sdp_ram: port widths must be multiples of each other");
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < WR_U; i++)
        mem[UA_W'(waddr) * UA_W'(WR_U) + UA_W'(i)] <= wdata[i*UNIT_W +: UNIT_W];
    end
  end

  always_ff @(posedge clk) begin
    if (re) begin
      for (int i = 0; i < RD_U; i++)
        rdata[i*UNIT_W +: UNIT_W] <= mem[UA_W'(raddr) * UA_W'(RD_U) + UA_W'(i)];
    end
  end
endmodule
