// act_memory: one 2 MiB activation memory with Shift-and-Safe.
//
// A scratchpad of BANKS banks (8 x 256 KiB), one read/write port 32 bytes
// (16 activations) wide, addressed by row. The last bank is the safe bank:
// it is supplied at the safe voltage and, besides ordinary rows, holds the
// L&H words of the layer in FIFO order at the Safe Pointer. The other banks
// run undervolted and have permanent stuck-at cells. The C-bit array tells,
// for every word, which transform the write port applied and the read port
// must undo (see sas_pkg).
//
// The memory alternates between two roles, chosen by wr_mode: output of the
// current layer (the write stream w_* owns the port) or its input (the read
// stream r_* owns it). The pair of memories swaps roles after every layer;
// restart must be pulsed at each role change so the Safe Pointer starts over.
// Rows are written and read in ascending order within a layer, as the
// document's memories fill one bank after the next from address 0.
//
// Stuck-at cells: fi_row shows the row being written and fi_mask/fi_val say,
// for each bit of that row, whether the cell is stuck and at what value; the
// data written into the undervolted banks is forced accordingly (a stuck
// cell reads its stuck value whatever was written, so forcing at write time
// is equivalent). Real silicon ties fi_mask to zero: the port only makes the
// fault map of an undervolted die observable in simulation. The safe bank
// and the C bits are never faulty.
//
// Timing: see sas_read_port and sas_write_port. The organisation, the safe
// bank and the C bits follow the document; the fault-map port and the role
// input are this design's.
module act_memory
  import sas_pkg::*;
#(
  parameter int unsigned BANKS         = 8,
  parameter int unsigned ROWS_PER_BANK = 8192,
  parameter int unsigned ROWS          = BANKS * ROWS_PER_BANK,
  parameter int unsigned ROW_W         = $clog2(ROWS),
  parameter int unsigned ADDR_W        = ROW_W + $clog2(LANES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_mode,    // 1: output of the layer, 0: input
  input  logic              restart,    // role change: Safe Pointer restarts
  // write stream (output role)
  input  logic              w_valid,
  output logic              w_ready,
  input  logic [ROW_W-1:0]  w_row,
  input  row_t              w_data,
  // read stream (input role)
  input  logic              r_req_valid,
  output logic              r_req_ready,
  input  logic [ROW_W-1:0]  r_req_row,
  output logic              r_valid,
  input  logic              r_ready,
  output row_t              r_data,
  // C-bit programming after the fabrication test
  input  logic              cb_we,
  input  logic [ROW_W-1:0]  cb_row,
  input  crow_t             cb_c,
  // stuck-at cells of the undervolted banks
  output logic [ROW_W-1:0]  fi_row,
  input  row_t              fi_mask,
  input  row_t              fi_val,
  // status
  output logic [ADDR_W-1:0] sp,
  output logic              safe_overflow
);

  localparam int unsigned BANK_W = $clog2(BANKS);
  localparam int unsigned BROW_W = $clog2(ROWS_PER_BANK);

  // ---- the two Shift-and-Safe ports --------------------------------------
  logic             wp_in_ready;
  logic             wp_m_en, wp_m_we;
  logic [ROW_W-1:0] wp_m_row;
  logic [LANES-1:0] wp_m_wen;
  row_t             wp_m_wdata;
  logic             wp_c_en;
  logic [ROW_W-1:0] wp_c_row;
  logic             wp_sp_adv;

  logic             rp_req_ready;
  logic             rp_m_en;
  logic [ROW_W-1:0] rp_m_row;
  logic             rp_c_en;
  logic [ROW_W-1:0] rp_c_row;
  logic             rp_sp_adv;

  row_t             m_rdata;
  crow_t            c_rd;

  sas_write_port #(.ROW_W(ROW_W), .ADDR_W(ADDR_W)) u_wport (
    .clk, .rst_n,
    .in_valid (w_valid && wr_mode), .in_ready(wp_in_ready),
    .in_row   (w_row), .in_data(w_data),
    .m_en     (wp_m_en), .m_we(wp_m_we), .m_row(wp_m_row),
    .m_wen    (wp_m_wen), .m_wdata(wp_m_wdata),
    .c_rd_en  (wp_c_en), .c_rd_row(wp_c_row), .c_rd(c_rd),
    .sp       (sp), .sp_adv(wp_sp_adv)
  );

  sas_read_port #(.ROW_W(ROW_W), .ADDR_W(ADDR_W)) u_rport (
    .clk, .rst_n,
    .req_valid(r_req_valid && !wr_mode), .req_ready(rp_req_ready),
    .req_row  (r_req_row),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data),
    .m_en     (rp_m_en), .m_row(rp_m_row), .m_rdata(m_rdata),
    .c_rd_en  (rp_c_en), .c_rd_row(rp_c_row), .c_rd(c_rd),
    .sp       (sp), .sp_adv(rp_sp_adv)
  );

  assign w_ready     = wp_in_ready && wr_mode;
  assign r_req_ready = rp_req_ready && !wr_mode;

  safe_pointer #(.ADDR_W(ADDR_W), .SAFE_WORDS(ROWS_PER_BANK * LANES)) u_sp (
    .clk, .rst_n, .restart,
    .advance (wr_mode ? wp_sp_adv : rp_sp_adv),
    .sp, .overflow(safe_overflow)
  );

  // ---- the single memory port, owned by the port of the current role -----
  logic             m_en, m_we;
  logic [ROW_W-1:0] m_row;
  logic [LANES-1:0] m_wen;
  row_t             m_wdata, m_wphys;

  always_comb begin
    if (wr_mode) begin
      m_en = wp_m_en;  m_we = wp_m_we;  m_row = wp_m_row;
      m_wen = wp_m_wen; m_wdata = wp_m_wdata;
    end else begin
      m_en = rp_m_en;  m_we = 1'b0;     m_row = rp_m_row;
      m_wen = '0;       m_wdata = '0;
    end
  end

  logic [BANK_W-1:0] bank, bank_q;
  assign bank   = m_row[ROW_W-1 -: BANK_W];
  assign fi_row = m_row;

  // stuck-at cells outside the safe bank
  always_comb begin
    for (int i = 0; i < LANES; i++)
      m_wphys[i] = (bank == BANK_W'(BANKS-1)) ? m_wdata[i]
                 : (m_wdata[i] & ~fi_mask[i]) | (fi_val[i] & fi_mask[i]);
  end

  row_t bank_rdata [BANKS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sram_bank #(.ROWS(ROWS_PER_BANK)) u_bank (
      .clk,
      .en    (m_en && bank == BANK_W'(b)),
      .we    (m_we),
      .row   (m_row[BROW_W-1:0]),
      .wen   (m_wen),
      .wdata (m_wphys),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                bank_q <= '0;
    else if (m_en && !m_we)    bank_q <= bank;
  end
  assign m_rdata = bank_rdata[bank_q];

  cbit_array #(.ROWS(ROWS)) u_cbits (
    .clk,
    .prog_we (cb_we), .prog_row(cb_row), .prog_c(cb_c),
    .rd_en   (wr_mode ? wp_c_en  : rp_c_en),
    .rd_row  (wr_mode ? wp_c_row : rp_c_row),
    .rd_c    (c_rd)
  );

endmodule
