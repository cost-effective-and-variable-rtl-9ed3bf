// tb_fastica_full: the FastICA processor at its default size (16 channels,
// 512 samples), running one complete FASTICA instruction on 16 artificial
// sources of eight kinds mixed by a random matrix and quantised to 12-bit
// integers, the form of the first artificial data set the architecture was
// evaluated on.  The mixtures enter through a fixed-point LOAD; the whitened
// signals and the weights are read back with OUTPUT.  Checked here, in real
// arithmetic: unit covariance of the whitened signals, orthonormal W, the
// separation quality of W'Z against the true sources (average and worst
// |correlation|), and that preprocessing plus 511 iterations at the measured
// cycles per iteration fits in 1.85 s at 100 MHz.
module tb_fastica_full;
  import tb_fp_pkg::*;

  localparam int NCH = 16;
  localparam int M   = 512;

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

  fastica_top dut (.*);

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
  real mix[NCH][NCH];

  // 16 sources of 8 kinds (sine, square, sawtooth, cubed uniform noise,
  // rectified sine, sparse impulses, triangle, sinc burst), two periods each
  function automatic real source(input int k, input int j);
    real u, pr;
    pr = (k < 8) ? 1.0 : 1.618;
    case (k % 8)
      0: return $sin(2.0*3.14159265*j/(23.0*pr));
      1: return ($sin(2.0*3.14159265*j/(41.0*pr)) >= 0.0) ? 1.0 : -1.0;
      2: return (real'(j % int'(17.0*pr)) / (17.0*pr)) - 0.5;
      3: begin u = real'(($urandom % 2001)) / 1000.0 - 1.0; return u*u*u; end
      4: begin u = $sin(2.0*3.14159265*j/(31.0*pr)); return (u < 0 ? -u : u) - 0.6366; end
      5: return (($urandom % 20) == 0) ? ((($urandom % 2) == 0) ? 1.0 : -1.0) : 0.0;
      6: begin u = real'(j % int'(29.0*pr)) / (29.0*pr); return (u < 0.5 ? u : 1.0 - u) - 0.25; end
      default: begin u = real'(j % int'(64.0*pr)) - 32.0*pr; return (u == 0.0) ? 1.0 : $sin(u/2.0)/(u/2.0); end
    endcase
  endfunction

  real Z[NCH][M], W[NCH][NCH], S[NCH][M];
  longint t_pre = 0;

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
    real cov, dot, best, c, sum_c, min_c;
    longint t0;
    for (int k = 0; k < n; k++)
      for (int j = 0; j < M; j++) src[k][j] = source(k, j);
    for (int c2 = 0; c2 < n; c2++)
      for (int k = 0; k < n; k++) mix[c2][k] = real'($urandom % 2001) / 1000.0 - 1.0;
    for (int c2 = 0; c2 < n; c2++)
      for (int j = 0; j < M; j++) begin
        sig[c2][j] = 0.0;
        for (int k = 0; k < n; k++) sig[c2][j] += mix[c2][k] * src[k][j];
      end
    // scale to 12-bit signed integers, as from an ADC
    begin
      real mx; mx = 0;
      for (int c2 = 0; c2 < n; c2++) for (int j = 0; j < M; j++)
        if ((sig[c2][j] < 0 ? -sig[c2][j] : sig[c2][j]) > mx) mx = (sig[c2][j] < 0 ? -sig[c2][j] : sig[c2][j]);
      for (int c2 = 0; c2 < n; c2++) for (int j = 0; j < M; j++)
        sig[c2][j] = real'($rtoi(sig[c2][j] / mx * 2047.0));
    end
    load(n, 1'b1);
    t0 = cyc;
    fork
      begin
        wait (int'(dut.u_ctrl.st) == 7);       // first weight update: preprocessing is over
        t_pre = cyc - t0;
      end
    join_none
    issue(3'd2, 5'(n), 9'(maxit), 15'h1CC0);          // threshold 2^-12
    wait_done();
    $display("FASTICA n=%0d: %0d iterations, converged=%0d, %0d cycles", n, iter_count, converged, cyc - t0);
    if (converged) n_conv_stop++;
    if (!converged && iter_count == 9'(maxit)) n_iter_stop++;
    if (n % 2 == 1) n_odd++;
    check(converged == expect_conv, "FASTICA stop reason");
    check(iter_count <= 9'(maxit) && iter_count >= 1, "iteration count within the limit");
    if (n == NCH) begin
      // worst case: preprocessing plus 511 iterations must fit in 1.85 s at 100 MHz
      longint per_it, worst;
      per_it = (cyc - t0 - t_pre) / longint'(iter_count);
      worst  = t_pre + 511 * per_it;
      $display("  preprocessing %0d cycles, %0d cycles per iteration, 511 iterations: %0d cycles", t_pre, per_it, worst);
      check(worst <= 185_000_000, "16-channel worst-case time within 1.85 s at 100 MHz");
    end
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
      sum_c = 0; min_c = 1.0;
      for (int k = 0; k < n; k++) begin
        best = 0;
        for (int i = 0; i < n; i++) begin c = corr(i, k); if (c > best) best = c; end
        $display("  source %0d: best |corr| = %f", k, best);
        sum_c += best;
        if (best < min_c) min_c = best;
      end
      $display("  average |corr| = %f, minimum = %f", sum_c / n, min_c);
      check(sum_c / n > 0.9, "average separation quality");
      check(min_c > 0.7, "worst-source separation quality");
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
    run_fastica(16, 60, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
