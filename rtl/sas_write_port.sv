// sas_write_port: Shift-and-Safe on the write side of an activation memory.
//
// Takes one block of 16 consecutive output activations and its row address
// (valid/ready), looks up the row's C bits and writes the block in the
// representation that makes the row's faulty cells hurt least:
//   C = 00  word written as is
//   C = 01  word shifted left by two, sign kept ({a[15], a[12:0], 00})
//   C = 10  word shifted as for 01, then bit-reversed (flipped)
//   C = 11  word not written in the row; instead it is appended to the safe
//           bank at the Safe Pointer, one word per cycle, lowest lane first
// Timing: the block is accepted in cycle 0 (C-bit read issued), the row is
// written in cycle 1 and each L&H word takes one more cycle, so a block
// occupies the single memory port for 2 + n_LH cycles; in_ready is high only
// when the port is idle. The transforms, the safe bank and the sharing of
// one memory port follow the document (which notes that the write port
// mirrors the read port it draws); the cycle-level sequencing, the lane order
// and leaving the C = 11 cells of the row unwritten are this design's.
module sas_write_port
  import sas_pkg::*;
#(
  parameter int unsigned ROW_W  = 16,  // row address width
  parameter int unsigned ADDR_W = 20   // word address width
) (
  input  logic              clk,
  input  logic              rst_n,
  // block to store
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [ROW_W-1:0]  in_row,
  input  row_t              in_data,
  // memory port
  output logic              m_en,
  output logic              m_we,
  output logic [ROW_W-1:0]  m_row,
  output logic [LANES-1:0]  m_wen,
  output row_t              m_wdata,
  // C bits
  output logic              c_rd_en,
  output logic [ROW_W-1:0]  c_rd_row,
  input  crow_t             c_rd,
  // safe pointer
  input  logic [ADDR_W-1:0] sp,
  output logic              sp_adv
);

  localparam int unsigned LANE_W = $clog2(LANES);

  typedef enum logic [1:0] {S_IDLE, S_ENC, S_SAFE} state_t;
  state_t state;

  logic [ROW_W-1:0]  row_q;
  row_t              data_q;
  logic [LANES-1:0]  pend;     // L&H lanes still to be written to the safe bank
  logic [LANES-1:0]  lh_now;   // L&H lanes of the row being encoded
  logic [LANE_W-1:0] sel;      // lowest pending lane
  logic [LANES-1:0]  pend_nxt;

  always_comb begin
    for (int i = 0; i < LANES; i++) lh_now[i] = (c_rd[i] == C_LH);
  end

  always_comb begin
    sel = '0;
    for (int i = LANES-1; i >= 0; i--) if (pend[i]) sel = LANE_W'(i);
  end

  always_comb begin
    pend_nxt      = pend;
    pend_nxt[sel] = 1'b0;
  end

  assign in_ready = (state == S_IDLE);
  assign c_rd_en  = (state == S_IDLE) && in_valid;
  assign c_rd_row = in_row;

  always_comb begin
    m_en    = 1'b0;
    m_we    = 1'b0;
    m_row   = row_q;
    m_wen   = '0;
    m_wdata = '0;
    sp_adv  = 1'b0;
    unique case (state)
      S_ENC: begin
        m_en  = 1'b1;
        m_we  = 1'b1;
        m_wen = ~lh_now;
        for (int i = 0; i < LANES; i++) m_wdata[i] = encode(data_q[i], c_rd[i]);
      end
      S_SAFE: begin
        m_en    = 1'b1;
        m_we    = 1'b1;
        m_row   = sp[ADDR_W-1:LANE_W];
        m_wen   = LANES'(1) << sp[LANE_W-1:0];
        m_wdata = {LANES{data_q[sel]}};
        sp_adv  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      row_q  <= '0;
      data_q <= '0;
      pend   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          row_q  <= in_row;
          data_q <= in_data;
          state  <= S_ENC;
        end
        S_ENC: begin
          pend  <= lh_now;
          state <= (|lh_now) ? S_SAFE : S_IDLE;
        end
        S_SAFE: begin
          pend <= pend_nxt;
          if (pend_nxt == '0) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Safe-bank writes only happen for pending L&H lanes.
  a_safe_has_work: assert property (@(posedge clk) disable iff (!rst_n)
                                    state == S_SAFE |-> pend != '0);

endmodule
