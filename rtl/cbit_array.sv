// cbit_array: the control (C) bits of an activation memory.
//
// Two bits per 16-bit activation word, 32 bits per 16-word row, kept in a
// separate array supplied at the safe voltage so the bits themselves never
// fail. They describe where the word's cells are faulty (see sas_pkg) and
// are written once, after the post-fabrication memory test, through the
// prog_* port; they do not depend on the network being run. In operation the
// row's C bits are read together with the data row: rd_en in one cycle,
// rd_c valid in the next and held until the next read. The document sizes
// them (256 KiB for a 2 MiB memory); the separate programming port and the
// one-cycle latency are this design's choices.
module cbit_array
  import sas_pkg::*;
#(
  parameter int unsigned ROWS  = 65536,
  parameter int unsigned ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  // post-fabrication programming
  input  logic             prog_we,
  input  logic [ROW_W-1:0] prog_row,
  input  crow_t            prog_c,
  // read, alongside the data row
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output crow_t            rd_c
);

  crow_t mem [ROWS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_row] <= prog_c;
    if (rd_en) rd_c <= mem[rd_row];
  end

endmodule
