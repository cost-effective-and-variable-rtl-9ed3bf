// pwl_lut: piecewise-linear lookup for the FastICA nonlinearity.
//
// The update step needs g(u) and g'(u) with g(u) = tanh(u) (the derivative of
// log cosh(u), constant a = 1).  Both are replaced by one line segment chosen
// by u: g(u) ~ alpha*u + beta and g'(u) ~ alpha, where alpha and beta are read
// from a table, as in the source architecture.  The segment layout is this
// design's choice (the source defers it to earlier work): 16 segments of width
// 0.25 cover |u| < 4, each the chord of tanh between its end points, so
//   alpha_s = (tanh(0.25(s+1)) - tanh(0.25 s)) / 0.25,
//   beta_s  = tanh(0.25 s) - alpha_s * 0.25 s,          s = 0..15,
// and |u| >= 4 uses alpha = 0, beta = 1.  tanh is odd, so for u < 0 the same
// alpha is used with beta negated.  The segment index floor(4|u|) is taken
// straight from the exponent and leading mantissa bits.  Combinational.
module pwl_lut
  import fica_pkg::*;
(
  input  f32_t u,
  output f32_t alpha,
  output f32_t beta
);
  localparam f32_t ALPHA_T [16] = '{
    32'h3F7ACBF5, 32'h3F5E6948, 32'h3F312F3F, 32'h3F017ADA,
    32'h3EB18A42, 32'h3E68EADF, 32'h3E146310, 32'h3DB990C6,
    32'h3D655A1C, 32'h3D0CB574, 32'h3CABE1D3, 32'h3C5163B2,
    32'h3BFEA84C, 32'h3B9AB306, 32'h3B3BD687, 32'h3AE3FD85};
  localparam f32_t BETA_T [16] = '{
    32'h00000000, 32'h3CE31568, 32'h3DEDAD7E, 32'h3E82F9F7,
    32'h3ED4656A, 32'h3F105FB8, 32'h3F3012A6, 32'h3F486651,
    32'h3F5A1F3F, 32'h3F669667, 32'h3F6F251D, 32'h3F74EB3C,
    32'h3F78C3F7, 32'h3F7B4DB1, 32'h3F7CF727, 32'h3F7E0C10};

  logic [7:0] e;
  logic [3:0] idx;
  logic       sat;
  f32_t       b_mag;
  always_comb begin
    e   = u[30:23];
    sat = (e >= 8'd129);                  // |u| >= 4
    if (e < 8'd125) idx = 4'd0;           // |u| < 0.25
    else            idx = 4'({1'b1, u[22:20]} >> (3'd3 - 3'(e - 8'd125)));
    alpha = sat ? F_ZERO : ALPHA_T[idx];
    b_mag = sat ? F_ONE  : BETA_T[idx];
    beta  = (b_mag == F_ZERO) ? F_ZERO : {u[31], b_mag[30:0]};
  end
endmodule
