// lifting_cell: one lifting step, y = a + c * (b + d), with a fixed constant c.
//
// This is the "LC" cell of the lifting structure: one adder sums the two
// neighbours b and d, a constant multiplier scales the sum by c, and a second
// adder adds the sample a being updated. That order of operations follows the
// source architecture's cell drawings. The constant is a signed fixed-point number with CF
// fraction bits; the product is rounded to nearest (add half an LSB, then an
// arithmetic shift) and the final sum saturates to the W-bit signed range.
// Rounding and saturation are this design's own choices; the source only gives
// the 12-bit word length. Purely combinational.
module lifting_cell
  import dwt_pkg::*;
#(
  parameter int COEF = dwt_pkg::ALPHA_Q
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] y
);

  localparam int PW = W + 1 + 32;                       // product width, room for any int COEF
  localparam logic signed [PW-1:0] HALF = PW'(1 << (CF - 1));
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 << (W - 1));

  logic signed [W:0]    sum;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] acc;

  always_comb begin
    sum  = (W+1)'(b) + (W+1)'(d);
    prod = PW'(sum) * PW'(COEF);
    acc  = ((prod + HALF) >>> CF) + PW'(a);
    if (acc > MAXV)      y = MAXV[W-1:0];
    else if (acc < MINV) y = MINV[W-1:0];
    else                 y = acc[W-1:0];
  end

endmodule
