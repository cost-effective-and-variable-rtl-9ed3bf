// fix2float: fixed-point to IEEE-754 single-precision converter.
//
// EEG samples coming from an ADC are integers; on the LOAD path they are
// converted to binary32 before they are written to the data memory.  The
// input is a signed two's-complement word of W bits with FRAC fractional bits
// (default: a 32-bit integer, FRAC = 0).  Rounding is to nearest even.  The
// source architecture names the converter but not its input width, which is
// therefore this design's choice.  Combinational.
module fix2float
  import fica_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 0
)(
  input  logic [W-1:0] x,
  output f32_t         y
);
  f32_t raw;
  always_comb begin
    raw = int_to_f32(32'(signed'(x)));
    if (FRAC != 0 && raw[30:23] > 8'(FRAC)) y = {raw[31], raw[30:23] - 8'(FRAC), raw[22:0]};
    else if (FRAC != 0)                     y = {raw[31], 31'd0};
    else                                    y = raw;
  end
endmodule
