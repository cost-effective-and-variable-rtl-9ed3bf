// tb_fastica_top: end-to-end test of the FastICA processor at a reduced size
// (NCH = 4 channels, M = 256 samples).
//
// Runs every instruction through the instruction port and checks the results
// against models computed here in real arithmetic:
//   - LOAD of FP32 and of fixed-point words, OUTPUT of signals and weights;
//   - FASTICA on 4 artificial sources mixed by a fixed matrix: the whitened
//     signals must have unit covariance, W must be orthonormal, and every
//     source must be recovered by W'Z with |correlation| > 0.95; a second run
//     with a 2-iteration limit must stop on the limit;
//   - REREF, SYNAVG (h = 4) and MOVAVG (r = 4 and r = 2) on integer data, whose
//     results are exact in FP32 and compared bit for bit.
// Each mechanism (fixed/float load, weight/signal output, convergence stop,
// iteration-limit stop, baseline skip, moving-average start-up, odd channel
// count) is counted, and one that never happened counts as a failure.
module tb_fastica_top;
  import tb_fp_pkg::*;

  localparam int NCH = 4;
  localparam int M   = 256;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] instr = '0;
  logic        instr_valid = 1'b0, instr_ready, done;
  logic [31:0] din = '0;
  logic        din_valid = 1'b0, din_ready;
  logic [31:0] dout;
  logic        dout_valid, dout_ready = 1'b0;
  logic        converged;
  logic [8:0]  iter_count;

  fastica_top #(.NCH(NCH), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_load_fix = 0, n_load_flt = 0, n_out_sig = 0, n_out_w = 0;
  int n_conv_stop = 0, n_iter_stop = 0, n_base_skip = 0, n_ma_edge = 0, n_odd = 0;

  real   sig  [NCH][M];          // data kept by the test
  real   rd   [NCH*M];           // words read back
  int    nrd;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic issue(input logic [2:0] op, input logic [4:0] p1, input logic [8:0] p2,
                       input logic [14:0] p3);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr = {op, p1, p2, p3};
    instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  task automatic wait_done();
    @(negedge clk);
    while (!done) @(negedge clk);
  endtask

  // LOAD n channels; fixed = 1 sends integers (values must be integral)
  task automatic load(input int n, input bit fixed);
    issue(3'd0, 5'(n), fixed ? 9'h1FF : 9'h000, '0);
    for (int c = 0; c < n; c++)
      for (int j = 0; j < M; j++) begin
        din = fixed ? 32'($rtoi(sig[c][j])) : r2f(sig[c][j]);
        din_valid = 1'b1;
        while (!din_ready) @(negedge clk);   // taken at the next rising edge
        @(negedge clk);
      end
    din_valid = 1'b0;
    wait_done();
    if (fixed) n_load_fix++; else n_load_flt++;
  endtask

  task automatic unload(input int n, input bit weights);
    int total;
    total = weights ? n*n : n*M;
    nrd = 0;
    issue(3'd1, 5'(n), weights ? 9'h1FF : 9'h000, '0);
    dout_ready = 1'b1;
    while (nrd < total) begin
      @(negedge clk);
      if (dout_valid) begin rd[nrd] = f2r(dout); nrd++; end   // taken at the next rising edge
    end
    @(negedge clk);                       // the last word is taken at the edge before this
    dout_ready = 1'b0;
    while (!done && !instr_ready) @(negedge clk);
    if (weights) n_out_w++; else n_out_sig++;
  endtask

  // ------------------------------------------------------------- sources
  real src[NCH][M];
  real mix[NCH][NCH] = '{'{1.0, 0.6, 0.3, 0.5}, '{0.4, 1.0, 0.7, 0.2},
                         '{0.5, 0.3, 1.0, 0.6}, '{0.2, 0.8, 0.4, 1.0}};

  function automatic real source(input int k, input int j);
    real ph;
    case (k % 4)
      0: return $sin(2.0*3.14159265*j/23.0);
      1: return ($sin(2.0*3.14159265*j/41.0) >= 0.0) ? 1.0 : -1.0;
      2: return (real'(j % 17) / 17.0) - 0.5;
      default: begin ph = real'(($urandom % 2001)) / 1000.0 - 1.0; return ph*ph*ph; end
    endcase
  endfunction

  real Z[NCH][M], W[NCH][NCH], S[NCH][M];

  function automatic real corr(input int a, input int b);   // |corr(S[a], src[b])|
    real ma, mb, sab, saa, sbb;
    ma = 0; mb = 0; sab = 0; saa = 0; sbb = 0;
    for (int j = 0; j < M; j++) begin ma += S[a][j]; mb += src[b][j]; end
    ma /= M; mb /= M;
    for (int j = 0; j < M; j++) begin
      sab += (S[a][j]-ma)*(src[b][j]-mb); saa += (S[a][j]-ma)**2; sbb += (src[b][j]-mb)**2;
    end
    return (sab < 0 ? -sab : sab) / $sqrt(saa*sbb);
  endfunction

  task automatic run_fastica(input int n, input int maxit, input bit expect_conv);
    real cov, dot, best, c;
    longint t0;
    for (int k = 0; k < n; k++)
      for (int j = 0; j < M; j++) src[k][j] = source(k, j);
    for (int c2 = 0; c2 < n; c2++)
      for (int j = 0; j < M; j++) begin
        sig[c2][j] = 0.0;
        for (int k = 0; k < n; k++) sig[c2][j] += mix[c2][k] * src[k][j] * 100.0;
      end
    load(n, 1'b0);
    t0 = cyc;
    issue(3'd2, 5'(n), 9'(maxit), 15'h1CC0);          // threshold 2^-12
    wait_done();
    $display("FASTICA n=%0d: %0d iterations, converged=%0d, %0d cycles", n, iter_count, converged, cyc - t0);
    if (converged) n_conv_stop++;
    if (!converged && iter_count == 9'(maxit)) n_iter_stop++;
    if (n % 2 == 1) n_odd++;
    check(converged == expect_conv, "FASTICA stop reason");
    check(iter_count <= 9'(maxit) && iter_count >= 1, "iteration count within the limit");
    unload(n, 1'b0);
    for (int c2 = 0; c2 < n; c2++) for (int j = 0; j < M; j++) Z[c2][j] = rd[c2*M + j];
    unload(n, 1'b1);
    for (int i = 0; i < n; i++) for (int c2 = 0; c2 < n; c2++) W[i][c2] = rd[i*n + c2];
    // whitened: covariance = I
    for (int a = 0; a < n; a++)
      for (int b = 0; b < n; b++) begin
        cov = 0;
        for (int j = 0; j < M; j++) cov += Z[a][j]*Z[b][j];
        cov /= M;
        check((a == b ? cov - 1.0 : cov) < 1e-3 && (a == b ? cov - 1.0 : cov) > -1e-3,
              $sformatf("whitened covariance (%0d,%0d) = %f", a, b, cov));
      end
    // W orthonormal
    for (int a = 0; a < n; a++)
      for (int b = 0; b < n; b++) begin
        dot = 0;
        for (int c2 = 0; c2 < n; c2++) dot += W[a][c2]*W[b][c2];
        check((a == b ? dot - 1.0 : dot) < 1e-4 && (a == b ? dot - 1.0 : dot) > -1e-4,
              $sformatf("W orthonormal (%0d,%0d) = %f", a, b, dot));
      end
    if (expect_conv) begin
      for (int i = 0; i < n; i++)
        for (int j = 0; j < M; j++) begin
          S[i][j] = 0;
          for (int c2 = 0; c2 < n; c2++) S[i][j] += W[i][c2]*Z[c2][j];
        end
      for (int k = 0; k < n; k++) begin
        best = 0;
        for (int i = 0; i < n; i++) begin c = corr(i, k); if (c > best) best = c; end
        $display("  source %0d: best |corr| = %f", k, best);
        check(best > 0.95, $sformatf("source %0d separated", k));
      end
    end
  endtask

  // ------------------------------------------------------------- auxiliary functions
  task automatic fill_int(input int n);
    for (int c2 = 0; c2 < n; c2++)
      for (int j = 0; j < M; j++) sig[c2][j] = real'(int'($urandom % 4001) - 2000);
  endtask

  task automatic run_reref(input int n, input int base);
    fill_int(n);
    load(n, 1'b1);
    issue(3'd3, 5'(n), 9'(base), '0);
    wait_done();
    unload(n, 1'b0);
    for (int c2 = 0; c2 < n; c2++)
      for (int j = 0; j < M; j++)
        check(rd[c2*M + j] == ((c2 == base) ? sig[c2][j] : sig[c2][j] - sig[base][j]),
              $sformatf("REREF ch %0d j %0d", c2, j));
    if (base != 0 && base != n-1) n_base_skip++;
  endtask

  task automatic run_synavg(input int h);
    real s;
    fill_int(h);
    load(h, 1'b1);
    issue(3'd4, 5'(h), '0, '0);
    wait_done();
    unload(h, 1'b0);
    for (int j = 0; j < M; j++) begin
      s = 0; for (int t = 0; t < h; t++) s += sig[t][j];
      check(r2f(rd[j]) == r2f(s / h), $sformatf("SYNAVG j %0d", j));
    end
    for (int t = 1; t < h; t++) check(rd[t*M + 5] == sig[t][5], "SYNAVG leaves other trials");
  endtask

  task automatic run_movavg(input int n, input int r, input int tgt);
    real s;
    fill_int(n);
    load(n, 1'b1);
    issue(3'd5, 5'(r), 9'(tgt), '0);
    wait_done();
    unload(n, 1'b0);
    for (int j = 0; j < M; j++) begin
      s = 0; for (int k = 0; k < r; k++) if (j - k >= 0) s += sig[tgt][j-k];
      check(r2f(rd[tgt*M + j]) == r2f(s / r), $sformatf("MOVAVG j %0d", j));
      if (j < r - 1) n_ma_edge++;
    end
    for (int c2 = 0; c2 < n; c2++) if (c2 != tgt) check(rd[c2*M + 7] == sig[c2][7], "MOVAVG leaves other channels");
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    run_reref(4, 1);
    run_reref(3, 2);
    run_synavg(4);
    run_movavg(4, 4, 2);
    run_movavg(2, 2, 0);
    run_fastica(4, 300, 1'b1);
    run_fastica(3, 2, 1'b0);
    check(n_load_fix > 0,  "mechanism: fixed-point LOAD");
    check(n_load_flt > 0,  "mechanism: FP32 LOAD");
    check(n_out_sig > 0,   "mechanism: signal OUTPUT");
    check(n_out_w > 0,     "mechanism: weight OUTPUT");
    check(n_conv_stop > 0, "mechanism: FASTICA stops on convergence");
    check(n_iter_stop > 0, "mechanism: FASTICA stops on the iteration limit");
    check(n_base_skip > 0, "mechanism: REREF skips a middle baseline channel");
    check(n_ma_edge > 0,   "mechanism: MOVAVG start-up samples");
    check(n_odd > 0,       "mechanism: odd channel count (PU2 idle)");
    $display("mechanisms: load_fix=%0d load_flt=%0d out_sig=%0d out_w=%0d conv=%0d iterlim=%0d base_skip=%0d ma_edge=%0d odd=%0d",
             n_load_fix, n_load_flt, n_out_sig, n_out_w, n_conv_stop, n_iter_stop, n_base_skip, n_ma_edge, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
