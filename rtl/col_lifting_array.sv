// col_lifting_array: the M/2 sections and R1..R4 buffers shared by the column
// low-pass and high-pass blocks.
//
// Each cycle one column u(0..M-1, n) of a row-processor output matrix arrives.
// Section k takes the rows (2k, 2k+1): row 2k is the sample being predicted and
// rows 2k+1 and 2k-1 are its neighbours. Every step of section k uses the carry
// (b, s1, s2, s3) of section k-1, all in the same cycle, so the array is four
// lifting cells deep whatever M is. Section 0 takes its carry from R1..R4, which
// hold the last section's carry for the same column of the previous strip; the
// last section's carry is written back into them. This chaining follows the
// source architecture's column-block drawings (registers R1..R4 from the last section to the
// first). hi(k) is the gamma-step output, lo(k) the delta-step output, both
// unscaled. Combinational from u and the buffers; the buffers are written when en
// is high, at column address addr; first_strip masks their outputs to zero.
module col_lifting_array
  import dwt_pkg::*;
#(
  parameter int M  = 16,
  parameter int N  = 512,
  parameter int AW = $clog2(N / 2)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          first_strip,
  input  logic [AW-1:0] addr,
  input  word_t         u  [M],
  output word_t         hi [M/2],
  output word_t         lo [M/2]
);

  localparam int S = M / 2;

  carry_t carry [S];   // carry leaving each section
  carry_t r_out;       // carry from the previous strip (R1..R4)

  r_line_buffer #(.DEPTH(N/2), .AW(AW)) u_r1 (.clk, .en, .addr, .zero(first_strip),
                                             .wdata(carry[S-1].b),  .rdata(r_out.b));
  r_line_buffer #(.DEPTH(N/2), .AW(AW)) u_r2 (.clk, .en, .addr, .zero(first_strip),
                                             .wdata(carry[S-1].s1), .rdata(r_out.s1));
  r_line_buffer #(.DEPTH(N/2), .AW(AW)) u_r3 (.clk, .en, .addr, .zero(first_strip),
                                             .wdata(carry[S-1].s2), .rdata(r_out.s2));
  r_line_buffer #(.DEPTH(N/2), .AW(AW)) u_r4 (.clk, .en, .addr, .zero(first_strip),
                                             .wdata(carry[S-1].s3), .rdata(r_out.s3));

  for (genvar k = 0; k < S; k++) begin : g_sec
    lifting_section u_sec (
      .a    (u[2*k]),
      .b    (u[2*k+1]),
      .prev ((k == 0) ? r_out : carry[(k == 0) ? 0 : k-1]),
      .cur  (carry[k]),
      .hi   (hi[k]),
      .lo   (lo[k])
    );
  end

endmodule
