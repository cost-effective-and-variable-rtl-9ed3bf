// maa_unit: single-precision multiply-and-add, y = a*b + c.
//
// The multiply-and-add (MAA) unit is the arithmetic core of each processing
// unit: centering sums, dot products, vector updates, accumulations and the
// linear segments of the nonlinearity are all expressed as a*b + c, with b = 1.0
// for plain additions.  This implementation is a non-fused multiply followed by
// an add, each rounded to nearest even (the source architecture does not give
// the unit's insides; the two-rounding form is this design's choice).
// Timing: purely combinational; the processing unit registers the result.
module maa_unit
  import fica_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  input  f32_t c,
  output f32_t y
);
  f32_t prod;
  always_comb begin
    prod = fp_mul(a, b);
    y    = fp_add(prod, c);
  end
endmodule
