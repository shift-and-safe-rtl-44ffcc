// control_unit: sequences the accelerator one layer at a time.
//
// A layer multiplies a block of ROWS input vectors (one per PE row) by a
// weight matrix of K rows and 16*T columns: input row k of the layer is
// activation-memory row k (16 activations, activation i for PE row i), and
// weight row k of output tile t is weight-memory row w_base + t*K + k. For
// each tile the unit clears the PE accumulators, streams the K activation
// rows from the input memory and the matching weight rows through the
// dispatchers, stepping the array once per operand pair (and stalling it
// while an activation row is late, e.g. when its L&H words are being
// fetched from the safe bank), drains the array with ROWS + COLS - 2 empty
// steps, captures the results into the output buffer and writes its 16
// columns to rows t*16 .. t*16+15 of the output memory. After the last tile
// it waits for the write port to finish, pulses done and swaps the roles of
// the two activation memories (in_sel), so the output of this layer is the
// input of the next, as the document's ping-pong memories do.
//
// Safe Pointer restarts: the output memory's pointer restarts when the layer
// starts (role change); the input memory's pointer restarts at the start of
// every tile, because each tile reads the input rows again from row 0 and
// the safe-bank FIFO has to be replayed in the same order.
//
// The roles of the control unit and the role swap follow the document; the
// layer format (a matrix product on a batch of 16 vectors), the tiling and
// all timing are this design's, as the document does not detail them.
module control_unit
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 16,
  parameter int unsigned ROW_W = 16,   // activation-memory row address width
  parameter int unsigned WRW_W = 16,   // weight-memory row address width
  parameter int unsigned COL_W = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // layer descriptor
  input  logic             start,
  input  logic [ROW_W-1:0] k_rows,     // K, input rows (>= 1)
  input  logic [ROW_W-1:0] n_tiles,    // T, output tiles of 16 columns (>= 1)
  input  logic [WRW_W-1:0] w_base,
  output logic             busy,
  output logic             done,
  output logic             in_sel,     // memory that is the input of the layer
  output logic             in_restart, // Safe Pointer restarts
  output logic             out_restart,
  // activation row requests to the input memory
  output logic             ar_valid,
  input  logic             ar_ready,
  output logic [ROW_W-1:0] ar_row,
  input  logic             ad_valid,
  output logic             ad_ready,
  // weight row reads
  output logic             wt_rd_en,
  output logic [WRW_W-1:0] wt_rd_row,
  // PE array and dispatchers
  output logic             step,
  output logic             feed_valid,
  output logic             clr,
  // output buffer and output memory
  output logic             capture,
  input  logic             ob_fire,    // a column accepted by the output memory
  input  logic [COL_W-1:0] ob_col,
  output logic [ROW_W-1:0] out_row,
  input  logic             out_idle    // output memory write port idle
);

  localparam int unsigned DRAIN = ROWS + COLS - 2;

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_FETCH, S_WAIT, S_DRAIN, S_CAPT, S_WRITE, S_FLUSH}
    state_t;
  state_t state;

  logic [ROW_W-1:0] k_q, t_q, k, t;
  logic [WRW_W-1:0] wrow;      // weight row of (t, k)
  logic [ROW_W-1:0] obase;     // first output row of tile t
  logic [7:0]       d;

  assign busy        = (state != S_IDLE);
  assign clr         = (state == S_CLR);
  assign in_restart  = (state == S_CLR);
  assign ar_valid    = (state == S_FETCH);
  assign ar_row      = k;
  assign wt_rd_en    = (state == S_FETCH) && ar_ready;
  assign wt_rd_row   = wrow;
  assign ad_ready    = (state == S_WAIT);
  assign step        = (state == S_WAIT && ad_valid) || state == S_DRAIN;
  assign feed_valid  = (state == S_WAIT);
  assign capture     = (state == S_CAPT);
  assign out_row     = obase + ROW_W'(ob_col);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      k_q         <= '0;
      t_q         <= '0;
      k           <= '0;
      t           <= '0;
      wrow        <= '0;
      obase       <= '0;
      d           <= '0;
      in_sel      <= 1'b0;
      done        <= 1'b0;
      out_restart <= 1'b0;
    end else begin
      done        <= 1'b0;
      out_restart <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_q         <= k_rows;
          t_q         <= n_tiles;
          t           <= '0;
          wrow        <= w_base;
          obase       <= '0;
          out_restart <= 1'b1;
          state       <= S_CLR;
        end
        S_CLR: begin
          k     <= '0;
          state <= S_FETCH;
        end
        S_FETCH: if (ar_ready) state <= S_WAIT;
        S_WAIT: if (ad_valid) begin
          k    <= k + 1'b1;
          wrow <= wrow + 1'b1;
          if (k == k_q - 1'b1) begin
            d     <= '0;
            state <= S_DRAIN;
          end else begin
            state <= S_FETCH;
          end
        end
        S_DRAIN: begin
          d <= d + 1'b1;
          if (d == 8'(DRAIN - 1)) state <= S_CAPT;
        end
        S_CAPT: state <= S_WRITE;
        S_WRITE: if (ob_fire && ob_col == COL_W'(COLS-1)) begin
          t     <= t + 1'b1;
          obase <= obase + ROW_W'(COLS);
          state <= (t == t_q - 1'b1) ? S_FLUSH : S_CLR;
        end
        S_FLUSH: if (out_idle) begin
          done   <= 1'b1;
          in_sel <= ~in_sel;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
