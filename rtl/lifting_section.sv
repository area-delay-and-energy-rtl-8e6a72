// lifting_section: the four cascaded lifting cells that turn one sample pair into
// a high-pass and a low-pass 9/7 output.
//
// Inputs are the pair (a, b) - a is the sample being predicted, b its following
// neighbour - and the carry of the previous pair (its b and its s1..s3). The four
// steps are
//   s1 = a       + alpha * (b  + b')        (predict)
//   s2 = b'      + beta  * (s1 + s1')       (update)
//   s3 = s1'     + gamma * (s2 + s2')       (predict -> high-pass)
//   s4 = s2'     + delta * (s3 + s3')       (update  -> low-pass)
// where ' marks the previous pair. These are the source architecture's row and column
// lifting equations; in the row processor the previous pair is the previous clock
// cycle, in a column block it is the section above. The cell outputs (b, s1..s3)
// are handed on as the carry for the next pair. Purely combinational, four cells
// deep, no scaling (scaling is done once, after the column lifting).
module lifting_section
  import dwt_pkg::*;
(
  input  word_t  a,
  input  word_t  b,
  input  carry_t prev,
  output carry_t cur,
  output word_t  hi,
  output word_t  lo
);

  word_t s1, s2, s3, s4;

  lifting_cell #(.COEF(ALPHA_Q)) u_alpha (.a(a),       .b(b),  .d(prev.b),  .y(s1));
  lifting_cell #(.COEF(BETA_Q))  u_beta  (.a(prev.b),  .b(s1), .d(prev.s1), .y(s2));
  lifting_cell #(.COEF(GAMMA_Q)) u_gamma (.a(prev.s1), .b(s2), .d(prev.s2), .y(s3));
  lifting_cell #(.COEF(DELTA_Q)) u_delta (.a(prev.s2), .b(s3), .d(prev.s3), .y(s4));

  assign cur = '{b: b, s1: s1, s2: s2, s3: s3};
  assign hi  = s3;
  assign lo  = s4;

endmodule
