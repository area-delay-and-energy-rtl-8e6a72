// row_processor: M independent 1-D 9/7 lifting pipelines, one per image row.
//
// Every enabled cycle row m receives the pixel pair x(m,2n-1), x(m,2n) and
// produces the row high-pass u_h(m,n) and low-pass u_l(m,n) samples. The pair
// runs through one lifting_section (four lifting cells in series, one cycle);
// the terms with index n-1 - x(m,2n-2), s11(m,n-1), s12(m,n-1), u_h(m,n-1) - are
// kept in four registers per row. With first_col high those registers are read
// as zero, so a new strip row starts from a zero left border. Outputs are
// combinational from the inputs and the row registers; the registers load when
// en is high. Pixels are unsigned and are zero-extended to W-bit words.
// The equations follow the source architecture; the zero border, the enable and the reset
// are this design's choices. No scaling is done here: it is merged into the
// column processor.
module row_processor
  import dwt_pkg::*;
#(
  parameter int M = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  first_col,
  input  pix_t  x_odd  [M],   // x(m, 2n-1)
  input  pix_t  x_even [M],   // x(m, 2n)
  output word_t u_h    [M],
  output word_t u_l    [M]
);

  for (genvar m = 0; m < M; m++) begin : g_row
    carry_t state_q, prev, cur;

    assign prev = first_col ? '0 : state_q;

    lifting_section u_sec (
      .a    (W'({1'b0, x_odd[m]})),
      .b    (W'({1'b0, x_even[m]})),
      .prev (prev),
      .cur  (cur),
      .hi   (u_h[m]),
      .lo   (u_l[m])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  state_q <= '0;
      else if (en) state_q <= cur;
    end
  end

endmodule
