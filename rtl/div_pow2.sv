// div_pow2: division of a single-precision number by 2^lambda.
//
// As in the source architecture, the division is done by subtracting lambda
// from the biased exponent, so no divider is needed.  lambda = 9 gives the
// 1/512 of the centering mean; lambda = 1..4 gives the 1/2..1/16 of the
// synchronised and moving averages.  A result whose exponent would drop to
// zero or below is flushed to a signed zero (this design's choice, matching the
// flush-to-zero policy of the rest of the datapath).  Infinity and NaN pass
// unchanged.  Combinational.
module div_pow2
  import fica_pkg::*;
(
  input  f32_t       x,
  input  logic [3:0] lambda,
  output f32_t       y
);
  always_comb begin
    if (x[30:23] == 8'hFF)                   y = x;
    else if (x[30:23] <= {4'd0, lambda})     y = {x[31], 31'd0};
    else                                     y = {x[31], x[30:23] - {4'd0, lambda}, x[22:0]};
  end
endmodule
