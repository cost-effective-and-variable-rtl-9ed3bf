// fica_pkg: types, constants and IEEE-754 single-precision helper functions
// shared by the FastICA processor.
//
// The arithmetic follows IEEE-754 binary32 with round-to-nearest-even.  To keep
// the datapath small, subnormal inputs are read as zero and results that would
// be subnormal are flushed to a signed zero (this design's choice; the source
// architecture only states that single precision is used).  Overflow gives an
// infinity; an infinity or NaN operand is propagated without further care.
//
// The instruction word (32 bits) is {op[2:0], p1[4:0], p2[8:0], p3[14:0]}, op
// in the most significant bits.  Op codes: LOAD=0, OUTPUT=1, FASTICA=2,
// REREF=3, SYNAVG=4, MOVAVG=5.
package fica_pkg;

  typedef logic [31:0] f32_t;

  localparam f32_t F_ZERO  = 32'h0000_0000;
  localparam f32_t F_ONE   = 32'h3F80_0000;
  localparam f32_t F_1P5   = 32'h3FC0_0000;  // 1.5
  localparam f32_t F_MHALF = 32'hBF00_0000;  // -0.5

  typedef enum logic [2:0] {
    OP_LOAD   = 3'd0,
    OP_OUTPUT = 3'd1,
    OP_FASTICA= 3'd2,
    OP_REREF  = 3'd3,
    OP_SYNAVG = 3'd4,
    OP_MOVAVG = 3'd5
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [4:0]  p1;
    logic [8:0]  p2;
    logic [14:0] p3;
  } instr_t;

  // Tasks a processing unit can run (see pu.sv)
  typedef enum logic [3:0] {
    T_NONE    = 4'd0,
    T_CENTER  = 4'd1,  // centre one channel
    T_UPDATE  = 4'd2,  // fixed-point update w_i+ for one weight vector
    T_GS      = 4'd3,  // Gram-Schmidt orthonormalisation of n vectors (PU1 only)
    T_CONV    = 4'd4,  // convergence sum  sum_i |w_old_i . w_new_i|  (PU1 only)
    T_REREF   = 4'd5,  // one channel minus the baseline channel
    T_SYNAVG  = 4'd6,  // synchronised average of one sample index
    T_MOVAVG  = 4'd7   // moving average of one sample index
  } task_e;

  // One task for a processing unit, issued by the main controller
  typedef struct packed {
    task_e       op;
    logic [4:0]  n;       // number of channels / weight vectors
    logic [3:0]  idx;     // channel or weight-vector index (target channel for MOVAVG)
    logic [3:0]  idx2;    // baseline channel (REREF)
    logic [9:0]  j;       // sample index (SYNAVG, MOVAVG)
    logic [4:0]  cnt;     // trials h (SYNAVG) or window r (MOVAVG)
    logic [3:0]  lambda;  // log2 of cnt
    logic        sel;     // weight bank: read bank (UPDATE, CONV) or bank to orthonormalise (GS)
    logic        gs_w;    // GS on the weight bank (1) or on the signal vectors (0)
    logic [14:0] thr;     // convergence threshold, upper 15 bits of an FP32 number
  } pu_task_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic [4:0] lzc24(input logic [23:0] v);
    logic [4:0] n;
    n = 5'd24;
    for (int i = 0; i < 24; i++)
      if (v[i]) n = 5'(23 - i);
    return n;
  endfunction

  function automatic logic [5:0] lzc32(input logic [31:0] v);
    logic [5:0] n;
    n = 6'd32;
    for (int i = 0; i < 32; i++)
      if (v[i]) n = 6'(31 - i);
    return n;
  endfunction

  // Round a normalised significand {1.xxx} held in sig[26:3] with guard,
  // round and sticky in sig[2:0], biased exponent e (may be out of range).
  function automatic f32_t fp_pack(input logic s, input logic signed [10:0] e,
                                   input logic [26:0] sig);
    logic [24:0] m;
    logic        up;
    logic signed [10:0] ee;
    up = sig[2] & (sig[1] | sig[0] | sig[3]);
    m  = {1'b0, sig[26:3]} + 25'(up);
    ee = e;
    if (m[24]) begin
      m  = m >> 1;
      ee = ee + 11'sd1;
    end
    if (ee <= 0)        return {s, 31'd0};
    else if (ee >= 255) return {s, 8'hFF, 23'd0};
    else                return {s, ee[7:0], m[22:0]};
  endfunction

  function automatic f32_t fp_mul(input f32_t a, input f32_t b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [26:0] sig;
    logic signed [10:0] e;
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    if (ea == 8'hFF) return (eb == 8'd0) ? 32'h7FC0_0000 : {s, a[30:0]};
    if (eb == 8'hFF) return (ea == 8'd0) ? 32'h7FC0_0000 : {s, b[30:0]};
    if (ea == 8'd0 || eb == 8'd0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = 11'(signed'({3'd0, ea})) + 11'(signed'({3'd0, eb})) - 11'sd127;
    if (p[47]) begin
      sig = {p[47:24], p[23], p[22], |p[21:0]};
      e   = e + 11'sd1;
    end else begin
      sig = {p[46:23], p[22], p[21], |p[20:0]};
    end
    return fp_pack(s, e, sig);
  endfunction

  function automatic f32_t fp_add(input f32_t a, input f32_t b);
    f32_t x, y;
    logic [7:0]  ex, ey, d;
    logic [26:0] mx, my, sh;
    logic [27:0] sum;
    logic [26:0] sig;
    logic [4:0]  lz;
    logic signed [10:0] e;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:23] == 8'd0) return (b[30:23] == 8'd0) ? {a[31] & b[31], 31'd0} : b;
    if (b[30:23] == 8'd0) return a;
    if (a[30:0] >= b[30:0]) begin x = a; y = b; end
    else                    begin x = b; y = a; end
    ex = x[30:23];
    ey = y[30:23];
    d  = ex - ey;
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    if (d >= 8'd27) sh = {26'd0, 1'b1};
    else begin
      sh = my >> d;
      // sticky: any bit shifted out
      if ((my & ((27'd1 << d) - 27'd1)) != 27'd0) sh[0] = 1'b1;
    end
    e = 11'(signed'({3'd0, ex}));
    if (x[31] == y[31]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[27]) begin
        sig = {sum[27:2], sum[1] | sum[0]};
        e   = e + 11'sd1;
      end else sig = sum[26:0];
    end else begin
      sum = {1'b0, mx} - {1'b0, sh};
      if (sum[26:0] == 27'd0) return F_ZERO;
      lz  = lzc24(sum[26:3]);
      if (sum[26:3] == 24'd0) lz = 5'd24;
      // shift left keeping guard/round/sticky bits
      sig = sum[26:0] << lz;
      e   = e - 11'(lz);
    end
    return fp_pack(x[31], e, sig);
  endfunction

  // signed 32-bit integer to float, round to nearest even
  function automatic f32_t int_to_f32(input logic signed [31:0] v);
    logic        s;
    logic [31:0] mag, nrm;
    logic [5:0]  lz;
    logic [26:0] sig;
    if (v == 0) return F_ZERO;
    s   = v[31];
    mag = s ? 32'(-v) : 32'(v);
    lz  = lzc32(mag);
    nrm = mag << lz;
    sig = {nrm[31:8], nrm[7], nrm[6], |nrm[5:0]};
    return fp_pack(s, 11'sd158 - 11'(lz), sig);
  endfunction

  // |a| < |b| for finite magnitudes
  function automatic logic fp_abs_lt(input f32_t a, input f32_t b);
    return a[30:0] < b[30:0];
  endfunction

endpackage
