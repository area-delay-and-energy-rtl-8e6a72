// dwt2d_lifting_top: full-parallel one-level 2-D 9/7 lifting DWT.
//
// The image is fed as strips of M rows, two columns per cycle: x_odd(m) and
// x_even(m) carry x(m,2n-1) and x(m,2n) for the M rows of the strip, so an M x N
// strip takes N/2 cycles and a frame of H rows H/M strips. The row processor
// lifts every row in parallel (four lifting cells per row, one cycle); a single
// pipeline register then holds the row low-pass and high-pass columns; the column
// processor lifts those columns across the rows in its two blocks, carries the
// last section's values to the next strip through its R1..R4 buffers, and applies
// the merged 2-D scaling (K^2 on LL, 1/K^2 on HH, nothing on LH and HL).
//
// Timing: a pair accepted (in_valid high) at clock edge t gives its four sub-band
// columns with out_valid high during the cycle after that edge, i.e. one cycle of
// latency; throughput is one column pair in, one column of each sub-band out,
// per cycle. in_valid low stalls everything. in_first_col marks the first pair
// of each strip row (zero left border), in_first_strip marks every pair of the
// first strip of a frame (zero top border). The frame buffer that feeds the strips
// is outside this design.
//
// The structure (row processor, one pipeline stage, two column blocks with R1..R4
// and M/2 scaling multipliers each) follows the source architecture. The valid/first-flag
// interface, the zero borders, the fixed-point format and the reset are this
// design's own choices.
module dwt2d_lifting_top
  import dwt_pkg::*;
#(
  parameter int M = 16,
  parameter int N = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first_col,
  input  logic  in_first_strip,
  input  pix_t  x_odd  [M],
  input  pix_t  x_even [M],
  output logic  out_valid,
  output word_t v_ll [M/2],
  output word_t v_lh [M/2],
  output word_t v_hl [M/2],
  output word_t v_hh [M/2]
);

  word_t u_l [M], u_h [M];

  row_processor #(.M(M)) u_row (
    .clk, .rst_n, .en(in_valid), .first_col(in_first_col),
    .x_odd, .x_even, .u_h, .u_l
  );

  // Pipeline stage between the row and column processors.
  word_t p_u_l [M], p_u_h [M];
  logic  p_valid, p_first_col, p_first_strip;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid       <= 1'b0;
      p_first_col   <= 1'b0;
      p_first_strip <= 1'b0;
    end else begin
      p_valid <= in_valid;
      if (in_valid) begin
        p_first_col   <= in_first_col;
        p_first_strip <= in_first_strip;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      p_u_l <= u_l;
      p_u_h <= u_h;
    end
  end

  column_processor #(.M(M), .N(N)) u_col (
    .clk, .rst_n, .en(p_valid), .first_col(p_first_col), .first_strip(p_first_strip),
    .u_l(p_u_l), .u_h(p_u_h), .v_ll, .v_lh, .v_hl, .v_hh
  );

  assign out_valid = p_valid;

endmodule
