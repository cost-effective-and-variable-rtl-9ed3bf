// tb_pu: runs every task of a processing unit (PU1 configuration, NCH = 4,
// M = 32) against a behavioural data memory with a one-cycle read latency, and
// compares the memory contents afterwards with results computed here in real
// arithmetic:
//   CENTER  channel minus its mean;
//   REREF   channel minus baseline (exact), and its latency of 3*M + 4 cycles
//           (three cycles per element: two reads and the MAA);
//   SYNAVG  average over 4 trials of one sample (exact);
//   MOVAVG  4-point average at sample 2, where only three samples exist (exact);
//   GS      signal vectors: Z Z' = M I afterwards; weight vectors: orthonormal,
//           first vector parallel to the original one;
//   UPDATE  w+ = sum_j z_j g(w'z_j) - (sum_j g'(w'z_j)) w with the
//           piecewise-linear tanh (chords over 0.25-wide segments);
//   CONV    converged for two equal banks, not converged for different ones.
// A second unit in the PU2 configuration (HAS_GS = 0, temporary memory of
// 2*NCH+1 words) runs every shared task at the same time on its own copy of the
// memory; its memory must end bit-identical to PU1's.
module tb_pu;
  import tb_fp_pkg::*;
  import fica_pkg::*;

  localparam int NCH = 4, M = 32, DEPTH = NCH*M + 2*NCH*NCH, AW = $clog2(DEPTH);
  localparam int WB0 = NCH*M;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done, converged;
  pu_task_t tsk = '0;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic [31:0] mem [DEPTH];

  pu #(.NCH(NCH), .M(M), .HAS_GS(1'b1)) dut (.*);

  logic start2 = 1'b0, busy2, done2, conv2, mem2_en, mem2_we;
  logic [AW-1:0] mem2_addr;
  logic [31:0] mem2_wdata, mem2_rdata;
  logic [31:0] mem2 [DEPTH];
  pu #(.NCH(NCH), .M(M), .HAS_GS(1'b0)) dut2 (
    .clk, .rst_n, .start(start2), .tsk, .busy(busy2), .done(done2), .converged(conv2),
    .mem_en(mem2_en), .mem_we(mem2_we), .mem_addr(mem2_addr), .mem_wdata(mem2_wdata), .mem_rdata(mem2_rdata));

  always #5 clk = ~clk;
  always_ff @(posedge clk)
    if (mem_en) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else        mem_rdata <= mem[mem_addr];
    end
  always_ff @(posedge clk)
    if (mem2_en) begin
      if (mem2_we) mem2[mem2_addr] <= mem2_wdata;
      else         mem2_rdata <= mem2[mem2_addr];
    end

  int checks = 0, failures = 0;
  int lat;
  real x[NCH][M], w0[NCH][NCH], w1[NCH][NCH];

  function automatic real rd(input int a); return f2r(mem[a]); endfunction
  function automatic real th(input real v); return ($exp(v) - $exp(-v)) / ($exp(v) + $exp(-v)); endfunction
  function automatic int wa(input int s, input int i, input int c); return WB0 + s*NCH*NCH + i*NCH + c; endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  // runs t on PU1; shared tasks also run on the PU2 configuration from the same
  // memory image, and both memories must then be identical
  task automatic run(input pu_task_t t);
    bit both, d1, d2, same;
    both = (t.op != T_GS && t.op != T_CONV);
    @(negedge clk);
    if (both) mem2 = mem;
    tsk = t; start = 1'b1; start2 = both;
    @(negedge clk);
    start = 1'b0; start2 = 1'b0;
    lat = 1; d1 = done; d2 = !both || done2;
    while (!(d1 && d2)) begin
      @(negedge clk);
      if (!d1) lat++;
      d1 |= done; d2 |= done2;
    end
    if (both) begin
      same = 1'b1;
      for (int i = 0; i < DEPTH; i++) if (mem2[i] != mem[i]) same = 1'b0;
      check(same, $sformatf("PU2 configuration matches PU1 on %s", t.op.name()));
    end
  endtask

  task automatic fill_int();
    for (int c = 0; c < NCH; c++) for (int j = 0; j < M; j++) begin
      x[c][j] = real'(int'($urandom % 2001) - 1000);
      mem[c*M + j] = r2f(x[c][j]);
    end
  endtask

  task automatic fill_real(input real scale);
    for (int c = 0; c < NCH; c++) for (int j = 0; j < M; j++) begin
      x[c][j] = f2r(r2f((real'($urandom % 20001) / 10000.0 - 1.0) * scale));
      mem[c*M + j] = r2f(x[c][j]);
    end
  endtask

  pu_task_t t;
  real s, mean, d, yv, al, be, au, b0, acc[NCH], sa;
  int seg;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- CENTER channel 1
    fill_real(100.0);
    t = '0; t.op = T_CENTER; t.n = 5'(NCH); t.idx = 4'd1;
    run(t);
    mean = 0; for (int j = 0; j < M; j++) mean += x[1][j]; mean /= M;
    for (int j = 0; j < M; j++) check(near(rd(M + j), x[1][j] - mean, 1e-4), $sformatf("CENTER j=%0d", j));
    check(rd(2*M + 3) == x[2][3], "CENTER leaves other channels");

    // ---------------- REREF channel 2, baseline 0
    fill_int();
    t = '0; t.op = T_REREF; t.n = 5'(NCH); t.idx = 4'd2; t.idx2 = 4'd0;
    run(t);
    for (int j = 0; j < M; j++) check(rd(2*M + j) == x[2][j] - x[0][j], $sformatf("REREF j=%0d", j));
    check(lat == 3*M + 4, $sformatf("REREF latency %0d, expected %0d", lat, 3*M + 4));

    // ---------------- SYNAVG sample 5 over 4 trials
    fill_int();
    t = '0; t.op = T_SYNAVG; t.n = 5'(NCH); t.j = 10'd5; t.cnt = 5'd4; t.lambda = 4'd2;
    run(t);
    s = 0; for (int c = 0; c < 4; c++) s += x[c][5];
    check(mem[5] == r2f(s / 4.0), "SYNAVG value");
    check(mem[M + 5] == r2f(x[1][5]), "SYNAVG leaves trial 1");

    // ---------------- MOVAVG channel 3, sample 2, window 4 (start-up)
    t = '0; t.op = T_MOVAVG; t.n = 5'(NCH); t.idx = 4'd3; t.j = 10'd2; t.cnt = 5'd4; t.lambda = 4'd2;
    run(t);
    check(mem[3*M + 2] == r2f((x[3][0] + x[3][1] + x[3][2]) / 4.0), "MOVAVG start-up value");
    t.j = 10'd20;
    run(t);
    check(mem[3*M + 20] == r2f((x[3][17] + x[3][18] + x[3][19] + x[3][20]) / 4.0), "MOVAVG value");

    // ---------------- GS on the signal vectors
    fill_real(10.0);
    t = '0; t.op = T_GS; t.n = 5'(NCH); t.gs_w = 1'b0;
    run(t);
    for (int a = 0; a < NCH; a++) for (int b = 0; b < NCH; b++) begin
      d = 0; for (int j = 0; j < M; j++) d += rd(a*M + j) * rd(b*M + j);
      check(near(d / M, (a == b) ? 1.0 : 0.0, 1e-4), $sformatf("GS signal (%0d,%0d) = %f", a, b, d / M));
    end
    s = 0; for (int j = 0; j < M; j++) s += x[0][j]*x[0][j];
    for (int j = 0; j < M; j++) check(near(rd(j), x[0][j] / $sqrt(s) * $sqrt(real'(M)), 1e-4), "GS first vector");

    // ---------------- GS on weight bank 1
    for (int i = 0; i < NCH; i++) for (int c = 0; c < NCH; c++) begin
      w1[i][c] = f2r(r2f(real'($urandom % 2001) / 1000.0 - 1.0));
      mem[wa(1, i, c)] = r2f(w1[i][c]);
    end
    t = '0; t.op = T_GS; t.n = 5'(NCH); t.gs_w = 1'b1; t.sel = 1'b1;
    run(t);
    for (int a = 0; a < NCH; a++) for (int b = 0; b < NCH; b++) begin
      d = 0; for (int c = 0; c < NCH; c++) d += rd(wa(1, a, c)) * rd(wa(1, b, c));
      check(near(d, (a == b) ? 1.0 : 0.0, 1e-5), $sformatf("GS weights (%0d,%0d)", a, b));
    end
    s = 0; for (int c = 0; c < NCH; c++) s += w1[0][c]*w1[0][c];
    for (int c = 0; c < NCH; c++) check(near(rd(wa(1, 0, c)), w1[0][c] / $sqrt(s), 1e-5), "GS first weight vector");

    // ---------------- UPDATE of w_2 from bank 0 into bank 1
    fill_real(2.0);
    for (int i = 0; i < NCH; i++) for (int c = 0; c < NCH; c++) begin
      w0[i][c] = f2r(r2f(real'($urandom % 2001) / 2000.0 - 0.5));
      mem[wa(0, i, c)] = r2f(w0[i][c]);
    end
    t = '0; t.op = T_UPDATE; t.n = 5'(NCH); t.idx = 4'd2; t.sel = 1'b0;
    run(t);
    for (int c = 0; c < NCH; c++) acc[c] = 0;
    sa = 0;
    for (int j = 0; j < M; j++) begin
      yv = 0; for (int c = 0; c < NCH; c++) yv += w0[2][c] * x[c][j];
      au = yv < 0 ? -yv : yv;
      seg = int'($floor(au * 4.0));
      if (seg >= 16) begin al = 0; be = 1; end
      else begin b0 = 0.25*seg; al = (th(b0 + 0.25) - th(b0)) / 0.25; be = th(b0) - al*b0; end
      if (yv < 0) be = -be;
      sa += al;
      for (int c = 0; c < NCH; c++) acc[c] += x[c][j] * (al*yv + be);
    end
    for (int c = 0; c < NCH; c++)
      check(near(rd(wa(1, 2, c)), acc[c] - sa * w0[2][c], 1e-3),
            $sformatf("UPDATE component %0d: %f expected %f", c, rd(wa(1, 2, c)), acc[c] - sa * w0[2][c]));
    check(mem[wa(0, 2, 0)] == r2f(w0[2][0]), "UPDATE leaves the old bank");

    // ---------------- CONV: equal banks converge, different banks do not
    for (int i = 0; i < NCH; i++) for (int c = 0; c < NCH; c++) begin
      mem[wa(0, i, c)] = (i == c) ? 32'h3F80_0000 : 32'h0;
      mem[wa(1, i, c)] = (i == c) ? 32'hBF80_0000 : 32'h0;      // sign flips still count as converged
    end
    t = '0; t.op = T_CONV; t.n = 5'(NCH); t.sel = 1'b0; t.thr = 15'h1CC0;
    run(t);
    check(converged == 1'b1, "CONV equal up to sign");
    mem[wa(1, 0, 0)] = 32'h3F3504F3; mem[wa(1, 0, 1)] = 32'h3F3504F3;   // w_1 rotated by 45 degrees
    mem[wa(1, 1, 0)] = 32'hBF3504F3; mem[wa(1, 1, 1)] = 32'h3F3504F3;
    run(t);
    check(converged == 1'b0, "CONV different banks");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
