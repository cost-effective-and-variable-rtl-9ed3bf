// tb_fp_pkg: reference conversions between IEEE-754 binary32 bit patterns and
// SystemVerilog reals, written independently of the RTL arithmetic.  The
// real-to-binary32 conversion rounds to nearest even and flushes results
// below the normal range to zero, like the datapath under test.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin m = '0; e = e + 1; end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // units in the last place between two binary32 values of the same sign
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 0;
    if (a[31] != b[31]) return 1 << 30;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction
endpackage
