// col_lowpass_block: column low-pass block of the column processor.
//
// Lifts each column of the row low-pass matrix u_l across its rows (M/2 sections
// of four lifting cells plus the R1..R4 strip carry, see col_lifting_array) and
// delivers one column of two sub-bands per cycle:
//   v_lh(k) = gamma-step output, unscaled (row K times column 1/K cancel)
//   v_ll(k) = delta-step output times K^2 (M/2 multipliers, the scaling unit)
// Which output is scaled by what follows the source architecture's block drawing and its
// integrated-scaling equation. Outputs are combinational from u and the buffers.
module col_lowpass_block
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
  input  word_t         u    [M],
  output word_t         v_ll [M/2],
  output word_t         v_lh [M/2]
);

  word_t lo [M/2];

  col_lifting_array #(.M(M), .N(N), .AW(AW)) u_arr (
    .clk, .en, .first_strip, .addr, .u, .hi(v_lh), .lo(lo)
  );

  scaling_unit #(.LANES(M/2), .COEF(K2_Q)) u_scale (.din(lo), .dout(v_ll));

endmodule
