// col_highpass_block: column high-pass block of the column processor.
//
// Same lifting array as the low-pass block, fed with the row high-pass matrix
// u_h. One column of two sub-bands per cycle:
//   v_hl(k) = delta-step output, unscaled (row 1/K times column K cancel)
//   v_hh(k) = gamma-step output times 1/K^2 (M/2 multipliers)
// as in the source architecture's high-pass block drawing. Combinational outputs.
module col_highpass_block
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
  output word_t         v_hl [M/2],
  output word_t         v_hh [M/2]
);

  word_t hi [M/2];

  col_lifting_array #(.M(M), .N(N), .AW(AW)) u_arr (
    .clk, .en, .first_strip, .addr, .u, .hi(hi), .lo(v_hl)
  );

  scaling_unit #(.LANES(M/2), .COEF(IK2_Q)) u_scale (.din(hi), .dout(v_hh));

endmodule
