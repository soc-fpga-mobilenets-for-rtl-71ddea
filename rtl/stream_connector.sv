// MobileNets Stream Connector: demultiplexes the single DMA stream into the
// input ports of the depthwise and pointwise units.
//
// A state machine selects one output port at a time and forwards valid, data
// and last to it, and its ready back to the DMA. A state lasts until the beat
// with tlast has been accepted, then the next state follows. The order within a
// stage is: depthwise weights, depthwise Batch Norm parameters, pointwise Batch
// Norm parameters, pointwise weights, pointwise shifts (scale exponents), then
// IFM tiles. After each IFM tile a counter decides what comes next: another IFM
// tile, a new block of pointwise weights and shifts followed by an IFM tile,
// or, after n_ifm tiles, the end of the stage (stage_done pulses and the
// connector waits for the next start). The reload schedule (first reload
// before IFM tile pw_first, then every pw_period tiles, pw_reloads times) is
// this design's encoding of the host's transfer order.
module stream_connector
  import mbn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,        // pulse: a stage's transfers begin
  input  logic [15:0]       n_ifm,
  input  logic [15:0]       pw_first,
  input  logic [15:0]       pw_period,
  input  logic [15:0]       pw_reloads,
  // from the DMA
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [AXIS_W-1:0] s_data,
  input  logic              s_last,
  // to the ports; index: 0 DW weights, 1 DW BN, 2 PW BN, 3 PW weights, 4 PW shifts, 5 IFM
  output logic [5:0]        m_valid,
  input  logic [5:0]        m_ready,
  output logic [AXIS_W-1:0] m_data,
  output logic              m_last,
  output logic              stage_done,
  output logic              busy
);
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_DW_W  = 3'd1,
    ST_DW_BN = 3'd2,
    ST_PW_BN = 3'd3,
    ST_PW_W  = 3'd4,
    ST_PW_S  = 3'd5,
    ST_IFM   = 3'd6
  } state_e;

  state_e      state;
  logic [15:0] ifm_cnt, next_reload, reloads_done;
  logic        fire;
  logic [5:0]  sel;

  always_comb begin
    unique case (state)
      ST_DW_W:  sel = 6'b000001;
      ST_DW_BN: sel = 6'b000010;
      ST_PW_BN: sel = 6'b000100;
      ST_PW_W:  sel = 6'b001000;
      ST_PW_S:  sel = 6'b010000;
      ST_IFM:   sel = 6'b100000;
      default:  sel = 6'b000000;
    endcase
  end

  assign m_valid = sel & {6{s_valid}};
  assign m_data  = s_data;
  assign m_last  = s_last;
  assign s_ready = |(sel & m_ready);
  assign fire    = s_valid && s_ready;
  assign busy    = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      ifm_cnt      <= '0;
      next_reload  <= '0;
      reloads_done <= '0;
      stage_done   <= 1'b0;
    end else begin
      stage_done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state        <= ST_DW_W;
          ifm_cnt      <= '0;
          next_reload  <= pw_first;
          reloads_done <= '0;
        end
        ST_DW_W:  if (fire && s_last) state <= ST_DW_BN;
        ST_DW_BN: if (fire && s_last) state <= ST_PW_BN;
        ST_PW_BN: if (fire && s_last) state <= ST_PW_W;
        ST_PW_W:  if (fire && s_last) state <= ST_PW_S;
        ST_PW_S:  if (fire && s_last) state <= ST_IFM;
        ST_IFM: if (fire && s_last) begin
          ifm_cnt <= ifm_cnt + 16'd1;
          if (ifm_cnt + 16'd1 == n_ifm) begin
            state      <= ST_IDLE;
            stage_done <= 1'b1;
          end else if (reloads_done < pw_reloads && ifm_cnt + 16'd1 == next_reload) begin
            state        <= ST_PW_W;
            reloads_done <= reloads_done + 16'd1;
            next_reload  <= next_reload + pw_period;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A port sees valid only while it is selected.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(m_valid));
endmodule
