// sas_read_port: Shift-and-Safe on the read side of an activation memory.
//
// For each requested row it reads the 16 stored words and their 32 C bits in
// one access, then sets up 16 four-input multiplexers, one per word, whose
// select is the word's C bits:
//   input 0 (C = 00)  the stored word, unchanged
//   input 1 (C = 01)  shifted back right by two: {s, 00, a[14:2]}
//   input 2 (C = 10)  unflipped (bit-reversed), then shifted back as input 1
//   input 3 (C = 11)  the word's value fetched from the safe bank
// Safe-bank words are read through the same memory port, one per cycle from
// the Safe Pointer, lowest lane first (the order the write port stored
// them), into a holding register per lane. Only when all of them are in is
// the whole block offered to the dispatcher (out_valid/out_ready).
// Timing: request accepted in cycle 0, row and C bits arrive in cycle 1; a
// block without L&H words is offered in cycle 2, a block with n of them in
// cycle n + 3 (n reads, one cycle for the last one to return). The mux
// inputs and the cycle-by-cycle safe-bank reads follow the document; the
// holding registers are flip-flops where the document speaks of latches,
// and the handshakes are this design's.
module sas_read_port
  import sas_pkg::*;
#(
  parameter int unsigned ROW_W  = 16,
  parameter int unsigned ADDR_W = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // row request
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ROW_W-1:0]  req_row,
  // decoded block to the dispatcher
  output logic              out_valid,
  input  logic              out_ready,
  output row_t              out_data,
  // memory port (reads only)
  output logic              m_en,
  output logic [ROW_W-1:0]  m_row,
  input  row_t              m_rdata,
  // C bits
  output logic              c_rd_en,
  output logic [ROW_W-1:0]  c_rd_row,
  input  crow_t             c_rd,
  // safe pointer
  input  logic [ADDR_W-1:0] sp,
  output logic              sp_adv
);

  localparam int unsigned LANE_W = $clog2(LANES);

  typedef enum logic [1:0] {S_IDLE, S_ROW, S_SAFE, S_OUT} state_t;
  state_t state;

  row_t              data_q;   // stored words of the row
  crow_t             c_q;      // their C bits
  row_t              hold;     // safe-bank values (mux input 3)
  logic [LANES-1:0]  pend;     // L&H lanes not yet requested
  logic [LANES-1:0]  lh_now;
  logic              inf_v;    // a safe-bank read is in flight
  logic [LANE_W-1:0] inf_idx;  // lane it belongs to
  logic [LANE_W-1:0] inf_word; // word of the returned row that holds it
  logic [LANE_W-1:0] sel;
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

  assign req_ready = (state == S_IDLE);
  assign c_rd_en   = (state == S_IDLE) && req_valid;
  assign c_rd_row  = req_row;
  assign out_valid = (state == S_OUT);

  always_comb begin
    m_en   = 1'b0;
    m_row  = req_row;
    sp_adv = 1'b0;
    if (state == S_IDLE && req_valid) begin
      m_en = 1'b1;
    end else if (state == S_SAFE && pend != '0) begin
      m_en   = 1'b1;
      m_row  = sp[ADDR_W-1:LANE_W];
      sp_adv = 1'b1;
    end
  end

  // The 16 output multiplexers.
  always_comb begin
    for (int i = 0; i < LANES; i++)
      out_data[i] = (c_q[i] == C_LH) ? hold[i] : decode(data_q[i], c_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      data_q   <= '0;
      c_q      <= crow_t'('0);
      hold     <= '0;
      pend     <= '0;
      inf_v    <= 1'b0;
      inf_idx  <= '0;
      inf_word <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) state <= S_ROW;
        S_ROW: begin
          data_q <= m_rdata;
          c_q    <= c_rd;
          pend   <= lh_now;
          state  <= (|lh_now) ? S_SAFE : S_OUT;
        end
        S_SAFE: begin
          if (inf_v) hold[inf_idx] <= m_rdata[inf_word];
          if (pend != '0) begin
            inf_v    <= 1'b1;
            inf_idx  <= sel;
            inf_word <= sp[LANE_W-1:0];
            pend     <= pend_nxt;
          end else begin
            inf_v <= 1'b0;
            state <= S_OUT;
          end
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
