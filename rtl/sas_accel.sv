// sas_accel: CNN inference accelerator whose activation memories run below
// their safe supply voltage, protected by Shift-and-Safe.
//
// Blocks: a 16 x 16 output-stationary systolic PE array with its output
// buffer; two 2 MiB activation memories (act_memory) that swap input and
// output roles after every layer; a 2 MiB weight memory; one dispatcher per
// memory; and a control unit. Each activation memory carries the
// Shift-and-Safe logic in its ports: per-word C bits, 2-bit sign-keeping
// shifts and flips for words with faulty cells in one byte, and a safe bank
// that stores words with faulty cells in both bytes in FIFO order.
//
// Off-chip side (the DRAM is not part of the design): while the control unit
// is idle, the h_* ports reach the activation memory selected by h_sel, with
// h_wr_mode choosing its role and h_restart restarting its Safe Pointer at
// the start of a load or of a read-out; weights are loaded through wt_ld_*.
// A layer is started with start and its descriptor (see control_unit); done
// pulses when its last output row is stored, and in_sel then names the
// memory that holds the layer's output (the next layer's input).
// Fabrication-test side: cb_* programs the C bits of memory cb_sel. fi_*
// models the stuck-at cells of each memory's undervolted banks and is tied
// to zero in silicon (see act_memory).
//
// The block structure follows the document; the layer format, handshakes
// and off-chip ports are this design's.
module sas_accel
  import sas_pkg::*;
#(
  parameter int unsigned BANKS         = 8,
  parameter int unsigned ROWS_PER_BANK = 8192,
  parameter int unsigned ACT_ROWS      = BANKS * ROWS_PER_BANK,
  parameter int unsigned W_ROWS        = 65536,
  parameter int unsigned ACC_W         = 48,
  parameter int unsigned ROW_W         = $clog2(ACT_ROWS),
  parameter int unsigned WRW_W         = $clog2(W_ROWS),
  parameter int unsigned ADDR_W        = ROW_W + $clog2(LANES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // layer control
  input  logic                    start,
  input  logic [ROW_W-1:0]        k_rows,
  input  logic [ROW_W-1:0]        n_tiles,
  input  logic [WRW_W-1:0]        w_base,
  input  logic [5:0]              shift,
  output logic                    busy,
  output logic                    done,
  output logic                    in_sel,
  // off-chip access to the activation memories (control unit idle)
  input  logic                    h_sel,
  input  logic                    h_wr_mode,
  input  logic                    h_restart,
  input  logic                    h_w_valid,
  output logic                    h_w_ready,
  input  logic [ROW_W-1:0]        h_w_row,
  input  row_t                    h_w_data,
  input  logic                    h_r_req_valid,
  output logic                    h_r_req_ready,
  input  logic [ROW_W-1:0]        h_r_req_row,
  output logic                    h_r_valid,
  input  logic                    h_r_ready,
  output row_t                    h_r_data,
  // weight loading
  input  logic                    wt_ld_we,
  input  logic [WRW_W-1:0]        wt_ld_row,
  input  row_t                    wt_ld_data,
  // C-bit programming
  input  logic                    cb_we,
  input  logic                    cb_sel,
  input  logic [ROW_W-1:0]        cb_row,
  input  crow_t                   cb_c,
  // stuck-at cells of the undervolted banks, per memory
  output logic [1:0][ROW_W-1:0]   fi_row,
  input  row_t [1:0]              fi_mask,
  input  row_t [1:0]              fi_val,
  // status
  output logic [1:0][ADDR_W-1:0]  safe_ptr,
  output logic [1:0]              safe_overflow
);

  localparam int unsigned COL_W = $clog2(LANES);

  // ---- control unit -------------------------------------------------------
  logic             in_restart, out_restart;
  logic             ar_valid, ar_ready, ad_valid, ad_ready;
  logic [ROW_W-1:0] ar_row, out_row;
  logic             wt_rd_en;
  logic [WRW_W-1:0] wt_rd_row;
  logic             step, feed_valid, clr, capture;
  logic             ob_valid, ob_ready, ob_fire, out_idle;
  logic [COL_W-1:0] ob_col;
  word_t [LANES-1:0] ob_data;

  control_unit #(.ROWS(LANES), .COLS(LANES), .ROW_W(ROW_W), .WRW_W(WRW_W)) u_ctrl (
    .clk, .rst_n, .start, .k_rows, .n_tiles, .w_base, .busy, .done, .in_sel,
    .in_restart, .out_restart,
    .ar_valid, .ar_ready, .ar_row, .ad_valid, .ad_ready,
    .wt_rd_en, .wt_rd_row, .step, .feed_valid, .clr, .capture,
    .ob_fire, .ob_col, .out_row, .out_idle
  );

  // ---- activation memories ------------------------------------------------
  logic [1:0]             m_wr_mode, m_restart;
  logic [1:0]             m_w_valid, m_w_ready;
  logic [1:0][ROW_W-1:0]  m_w_row;
  row_t [1:0]             m_w_data;
  logic [1:0]             m_rq_valid, m_rq_ready, m_r_valid, m_r_ready;
  logic [1:0][ROW_W-1:0]  m_rq_row;
  row_t [1:0]             m_r_data;

  for (genvar m = 0; m < 2; m++) begin : g_mem
    logic is_in, is_host;
    assign is_in   = busy && (in_sel == 1'(m));
    assign is_host = !busy && (h_sel == 1'(m));

    assign m_wr_mode[m] = busy ? !is_in : (is_host && h_wr_mode);
    assign m_restart[m] = busy ? (is_in ? in_restart : out_restart)
                               : (is_host && h_restart);

    assign m_w_valid[m] = busy ? (!is_in && ob_valid) : (is_host && h_w_valid);
    assign m_w_row[m]   = busy ? out_row : h_w_row;
    assign m_w_data[m]  = busy ? row_t'(ob_data) : h_w_data;

    assign m_rq_valid[m] = busy ? (is_in && ar_valid) : (is_host && h_r_req_valid);
    assign m_rq_row[m]   = busy ? ar_row : h_r_req_row;
    assign m_r_ready[m]  = busy ? (is_in && ad_ready) : (is_host && h_r_ready);

    act_memory #(.BANKS(BANKS), .ROWS_PER_BANK(ROWS_PER_BANK)) u_mem (
      .clk, .rst_n,
      .wr_mode     (m_wr_mode[m]), .restart(m_restart[m]),
      .w_valid     (m_w_valid[m]), .w_ready(m_w_ready[m]),
      .w_row       (m_w_row[m]),   .w_data (m_w_data[m]),
      .r_req_valid (m_rq_valid[m]), .r_req_ready(m_rq_ready[m]),
      .r_req_row   (m_rq_row[m]),
      .r_valid     (m_r_valid[m]), .r_ready(m_r_ready[m]), .r_data(m_r_data[m]),
      .cb_we       (cb_we && cb_sel == 1'(m)), .cb_row(cb_row), .cb_c(cb_c),
      .fi_row      (fi_row[m]), .fi_mask(fi_mask[m]), .fi_val(fi_val[m]),
      .sp          (safe_ptr[m]), .safe_overflow(safe_overflow[m])
    );
  end

  // layer side
  assign ar_ready = m_rq_ready[in_sel];
  assign ad_valid = m_r_valid[in_sel];
  assign ob_ready = m_w_ready[!in_sel];
  assign ob_fire  = ob_valid && ob_ready;
  assign out_idle = m_w_ready[!in_sel] && !ob_valid;

  // host side
  assign h_w_ready     = !busy && m_w_ready[h_sel];
  assign h_r_req_ready = !busy && m_rq_ready[h_sel];
  assign h_r_valid     = !busy && m_r_valid[h_sel];
  assign h_r_data      = m_r_data[h_sel];

  // ---- weight memory ------------------------------------------------------
  row_t wt_rdata;

  weight_memory #(.ROWS(W_ROWS)) u_wmem (
    .clk,
    .ld_we  (wt_ld_we && !busy), .ld_row(wt_ld_row), .ld_data(wt_ld_data),
    .rd_en  (wt_rd_en), .rd_row(wt_rd_row), .rdata(wt_rdata)
  );

  // ---- dispatchers --------------------------------------------------------
  // One per activation memory (only the input memory's one is stepped) and
  // one for the weights.
  word_t [1:0][LANES-1:0] act_disp;
  word_t [LANES-1:0]      a_edge, w_edge;

  for (genvar m = 0; m < 2; m++) begin : g_adisp
    dispatcher u_adisp (
      .clk, .rst_n,
      .en       (step && in_sel == 1'(m)),
      .in_valid (feed_valid),
      .in_vec   (m_r_data[m]),
      .out_vec  (act_disp[m])
    );
  end
  assign a_edge = act_disp[in_sel];

  dispatcher u_wdisp (
    .clk, .rst_n, .en(step), .in_valid(feed_valid),
    .in_vec (wt_rdata), .out_vec(w_edge)
  );

  // ---- PE array and output buffer ----------------------------------------
  logic [LANES-1:0][LANES-1:0][ACC_W-1:0] acc;

  pe_array #(.ROWS(LANES), .COLS(LANES), .ACC_W(ACC_W)) u_array (
    .clk, .rst_n, .en(step), .clr, .a_in(a_edge), .w_in(w_edge), .acc
  );

  output_buffer #(.ROWS(LANES), .COLS(LANES), .ACC_W(ACC_W)) u_obuf (
    .clk, .rst_n, .capture, .acc, .shift,
    .out_valid(ob_valid), .out_ready(ob_ready), .out_col(ob_col), .out_data(ob_data)
  );

endmodule
