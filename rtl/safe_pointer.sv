// safe_pointer: the Safe Pointer (SP) of an activation memory.
//
// The safe bank, the last bank of the memory, is powered at the safe voltage
// and holds the values of L&H words (faults in both bytes). Because a layer
// is read back in the order it was written, the safe bank works as a FIFO
// with a single pointer: while the memory is the output of a layer each L&H
// word is written at SP, while it is the input each L&H word is read from
// SP, and in both cases SP then moves to the next entry. SP returns to the
// last memory address whenever the memory changes its input/output role
// (restart, one cycle). Entries are taken from the last address downwards,
// so the FIFO grows from the end of the address space towards the layer
// data. Once the lowest entry has been used SP stays there, and a further use
// raises the sticky overflow flag (that value is lost) until the next restart.
//
// The document states that SP starts at the last memory address and also
// that entries occupy ascending addresses. Starting at the last address only
// leaves room downwards, so this design counts down.
module safe_pointer #(
  parameter int unsigned ADDR_W     = 20,      // word address width
  parameter int unsigned SAFE_WORDS = 131072   // words in the safe bank
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,   // role change: back to the last address
  input  logic              advance,   // one safe-bank entry used
  output logic [ADDR_W-1:0] sp,
  output logic              overflow
);

  localparam logic [ADDR_W-1:0] LAST  = '1;
  localparam logic [ADDR_W-1:0] FIRST = LAST - ADDR_W'(SAFE_WORDS - 1);

  logic full;  // the entry at FIRST has been used

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp       <= LAST;
      overflow <= 1'b0;
      full     <= 1'b0;
    end else if (restart) begin
      sp       <= LAST;
      overflow <= 1'b0;
      full     <= 1'b0;
    end else if (advance) begin
      // the entry at FIRST is the last one; a use after it is an overflow
      if (full)             overflow <= 1'b1;
      else if (sp == FIRST) full     <= 1'b1;
      else                  sp       <= sp - 1'b1;
    end
  end

endmodule
