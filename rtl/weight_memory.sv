// weight_memory: the accelerator's 2 MiB weight memory.
//
// Single-port synchronous SRAM of ROWS rows of 16 weights (32 bytes). It is
// supplied at a safe voltage, so it needs no fault protection. The off-chip
// side loads it one row at a time (ld_we), which takes the port; otherwise
// rd_en reads a row that appears on rdata in the next cycle and stays there
// until the next read, so the weight dispatcher can take it whenever the
// matching activation row arrives. Size from the document; the row width
// (equal to the activation rows) and the load port are this design's.
module weight_memory
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 65536,
  parameter int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             ld_we,
  input  logic [ROW_W-1:0] ld_row,
  input  row_t             ld_data,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output row_t             rdata
);

  row_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (ld_we)      mem[ld_row] <= ld_data;
    else if (rd_en) rdata <= mem[rd_row];
  end

endmodule
