// r_line_buffer: one of the carry registers R1..R4 of a column block.
//
// The column lifting of section 1 needs the values of the last section of the
// strip above it, for the same image column. Strips are fed one after another,
// N/2 columns each, so this buffer stores one word per column: each enabled cycle
// it returns the word written at the same address during the previous strip and
// then overwrites it with the current last-section value (read before write).
// With zero high (first strip of a frame) the read value is forced to zero, which
// is the top border; the memory itself is never cleared. Read is combinational,
// write on the clock edge. Depth DEPTH = N/2; four of these per column block give
// the 4N words of on-chip memory the source architecture counts for the whole structure.
module r_line_buffer
  import dwt_pkg::word_t;
#(
  parameter int DEPTH = 256,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic          zero,
  input  word_t         wdata,
  output word_t         rdata
);

  word_t mem [DEPTH];

  assign rdata = zero ? '0 : mem[addr];

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= wdata;
  end

endmodule
