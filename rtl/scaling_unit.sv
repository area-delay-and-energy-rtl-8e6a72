// scaling_unit: LANES constant multipliers for the integrated 2-D scaling.
//
// Row and column 9/7 lifting each need low-pass x K and high-pass x 1/K. Done
// once after the column lifting, LH and HL need no scaling at all, LL needs K^2
// and HH needs 1/K^2: that is the source architecture's integrated scaling, and why each
// column block has only M/2 multipliers here. Each lane computes
// dout = round(din * COEF / 2^CF), saturated to W bits. Combinational.
module scaling_unit
  import dwt_pkg::*;
#(
  parameter int LANES = 8,
  parameter int COEF  = dwt_pkg::K2_Q
) (
  input  word_t din  [LANES],
  output word_t dout [LANES]
);

  localparam int PW = W + 32;
  localparam logic signed [PW-1:0] HALF = PW'(1 << (CF - 1));
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (W - 1)) - 1);
  localparam logic signed [PW-1:0] MINV = -PW'(1 << (W - 1));

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    logic signed [PW-1:0] prod;
    always_comb begin
      prod = (PW'(din[i]) * PW'(COEF) + HALF) >>> CF;
      if (prod > MAXV)      dout[i] = MAXV[W-1:0];
      else if (prod < MINV) dout[i] = MINV[W-1:0];
      else                  dout[i] = prod[W-1:0];
    end
  end

endmodule
