// Send Results: buffers pointwise OFM pixels and streams them to the DMA.
//
// Four OFM memories (8-bit write, 64-bit read, 3136 pixels each) form two
// ping-pong sets: OFM-MEM1/OFM-MEM2 and OFM-MEM3/OFM-MEM4. In a set, the first
// memory receives the pixels of the first MAC unit (first half of the filter
// group) and the second memory those of the second MAC unit, at the
// accumulator address. While one set is being streamed out, the other one
// collects the next group, so sending overlaps with computing.
// When the pointwise stage marks a set done (set_done), the set is sent as
// n_bytes/8 64-bit words of its first memory followed by the same of its second,
// eight pixels per beat, lowest address in the lowest byte; tlast marks the
// final beat. set_free tells the pointwise stage whether the set it would write
// next is empty. Each beat takes two clocks (read, then hold until accepted);
// this rate is this design's choice and is below the pointwise production rate.
module send_results
  import mbn_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,      // pulse: new stage
  input  logic [11:0]           n_bytes,    // pixels per memory in a set (multiple of 8)
  // from the two ReLU6 units
  input  logic                  wvalid,
  input  logic [11:0]           waddr,
  input  logic [PW_OUT_W-1:0]   wdata_a,
  input  logic [PW_OUT_W-1:0]   wdata_b,
  input  logic                  set_done,   // pulse: the write set is complete
  output logic                  set_free,
  // to the DMA
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic [AXIS_W-1:0]     m_data,
  output logic                  m_last
);
  logic       wset, rset;
  logic [1:0] full;
  logic [AXIS_W-1:0] rdata [4];
  logic       re;
  logic       rbank;          // 0: first memory of the set, 1: second
  logic [8:0] rword;
  logic [8:0] n_words;

  assign n_words  = n_bytes[11:3];
  assign set_free = !full[wset];

  for (genvar m = 0; m < 4; m++) begin : g_ofm
    // memory m belongs to set m/2 and holds MAC unit m%2
    sdp_ram #(.WR_W(8), .RD_W(64), .WORDS(ACC_DEPTH)) u_ofm_mem (
      .clk,
      .we(wvalid && wset == 1'(m / 2)),
      .waddr(waddr),
      .wdata((m % 2 == 0) ? wdata_a : wdata_b),
      .re(re && rset == 1'(m / 2) && rbank == 1'(m % 2)),
      .raddr(rword),
      .rdata(rdata[m]));
  end

  typedef enum logic [1:0] {S_IDLE, S_READ, S_SEND} st_e;
  st_e st;
  logic last_word;
  assign last_word = rbank && (rword == n_words - 9'd1);
  assign re        = (st == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; wset <= 1'b0; rset <= 1'b0; full <= '0;
      rbank <= 1'b0; rword <= '0; m_valid <= 1'b0; m_last <= 1'b0;
    end else if (start) begin
      st <= S_IDLE; wset <= 1'b0; rset <= 1'b0; full <= '0;
      rbank <= 1'b0; rword <= '0; m_valid <= 1'b0; m_last <= 1'b0;
    end else begin
      if (set_done) begin
        full[wset] <= 1'b1;
        wset <= ~wset;
      end
      unique case (st)
        S_IDLE: if (full[rset]) begin
          st <= S_READ; rbank <= 1'b0; rword <= '0;
        end
        S_READ: begin
          st      <= S_SEND;
          m_valid <= 1'b1;
          m_last  <= last_word;
        end
        S_SEND: if (m_ready) begin
          m_valid <= 1'b0;
          m_last  <= 1'b0;
          if (last_word) begin
            full[rset] <= 1'b0;
            rset <= ~rset;
            st   <= S_IDLE;
          end else begin
            st <= S_READ;
            if (rword == n_words - 9'd1) begin
              rword <= '0;
              rbank <= 1'b1;
            end else begin
              rword <= rword + 9'd1;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign m_data = rdata[{rset, rbank}];

  // the pointwise stage never finishes a set that is still being sent
  assert property (@(posedge clk) disable iff (!rst_n) set_done |-> !full[wset]);
endmodule
