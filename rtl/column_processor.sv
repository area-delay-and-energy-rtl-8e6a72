// column_processor: low-pass and high-pass column blocks side by side.
//
// Each enabled cycle it takes one column of the row low-pass matrix (to the
// low-pass block) and one of the row high-pass matrix (to the high-pass block),
// with no transposition, and returns one column of each of the four sub-bands
// LL, LH, HL, HH, M/2 values each. It also keeps the column index within the
// current strip, which addresses the R1..R4 buffers of both blocks: the index is
// 0 on the cycle first_col is high and counts up by one per enabled cycle,
// wrapping after N/2 columns. An assertion flags a strip that starts before the
// previous one had N/2 columns. The counter is this design's own; the block split
// follows the source architecture. Outputs are combinational from the inputs.
module column_processor
  import dwt_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first_col,
  input  logic  first_strip,
  input  word_t u_l  [M],
  input  word_t u_h  [M],
  output word_t v_ll [M/2],
  output word_t v_lh [M/2],
  output word_t v_hl [M/2],
  output word_t v_hh [M/2]
);

  localparam int COLS = N / 2;
  localparam int AW   = $clog2(COLS);

  logic [AW-1:0] col_q, addr;

  assign addr = first_col ? '0 : col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  col_q <= '0;
    else if (en) col_q <= (addr == AW'(COLS - 1)) ? '0 : addr + 1'b1;
  end

  // Interface rule: every strip is exactly N/2 enabled columns, so a strip can
  // only start (first_col) where the counter has just wrapped to 0.
  a_strip_length: assert property (@(posedge clk)
                                   en && first_col |-> col_q == '0)
    else $error("strip started after %0d columns, a strip has %0d", col_q, COLS);

  col_lowpass_block #(.M(M), .N(N), .AW(AW)) u_low (
    .clk, .en, .first_strip, .addr, .u(u_l), .v_ll, .v_lh
  );

  col_highpass_block #(.M(M), .N(N), .AW(AW)) u_high (
    .clk, .en, .first_strip, .addr, .u(u_h), .v_hl, .v_hh
  );

endmodule
