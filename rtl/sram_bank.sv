// sram_bank: one 256 KiB bank of an activation memory.
//
// A single-port synchronous SRAM organised as ROWS rows of LANES 16-bit
// words (32 bytes per row, the access width of the activation memory). One
// operation per cycle: a row read (en & !we) returns the row on rdata in the
// next cycle; a write (en & we) stores the words whose bit in wen is set, so
// the same port serves both full-row writes and single-word writes of the
// safe bank. rdata holds its value between reads. The bank size and the
// 32-byte row follow the document; the per-word write enables and the
// one-cycle read latency are this design's choices. Undervolting faults are
// not modelled here but on the write data path in act_memory.
module sram_bank
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 8192,
  parameter int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [LANES-1:0] wen,
  input  row_t             wdata,
  output row_t             rdata
);

  row_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        for (int i = 0; i < LANES; i++)
          if (wen[i]) mem[row][i] <= wdata[i];
      end else begin
        rdata <= mem[row];
      end
    end
  end

endmodule
