// tb_fastica_ctrl: the controller on its own (NCH = 4, M = 8).  The two PUs
// are replaced by stubs that log every task they receive and answer with done
// after a random 1..6 cycle delay; port A goes to a behavioural memory with a
// one-cycle read.  Checked:
//   LOAD    fixed-point words converted to FP32 and stored channel by channel,
//           FP32 words stored unchanged, nothing written past n*M;
//   OUTPUT  signal words and the n x n weight matrix, in order, with dout_ready
//           stalls;
//   FASTICA identity W in bank 0; task order (centering in pairs, GS of the
//           signals, then per iteration: updates in pairs, GS of the new bank,
//           convergence test), bank alternation, stop at the iteration limit
//           and stop on convergence, iter_count and converged;
//   REREF   baseline channel skipped, the others shared by PU1/PU2;
//   SYNAVG  PU1 even, PU2 odd sample indices, ascending; trial count and shift;
//   MOVAVG  PU1/PU2 indices descending from M-1; target channel;
//   done    one pulse per instruction, instr_ready low while busy.
module tb_fastica_ctrl;
  import tb_fp_pkg::*;
  import fica_pkg::*;

  localparam int NCH = 4, M = 8, DEPTH = NCH*M + 2*NCH*NCH, AW = $clog2(DEPTH);
  localparam int WB0 = NCH*M;

  logic clk = 1'b0, rst_n = 1'b0;
  instr_t instr = '0;
  logic instr_valid = 1'b0, instr_ready, done;
  logic [31:0] din = '0;
  logic din_valid = 1'b0, din_ready;
  f32_t dout;
  logic dout_valid, dout_ready = 1'b0;
  logic converged;
  logic [8:0] iter_count;
  logic p1_start, p2_start, p1_done = 1'b0, p2_done = 1'b0, p1_conv = 1'b0;
  pu_task_t p1_tsk, p2_tsk;
  logic c_en, c_we;
  logic [AW-1:0] c_addr;
  f32_t c_wdata, a_rdata;

  fastica_ctrl #(.NCH(NCH), .M(M)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] mem [DEPTH];
  int writes = 0;
  always_ff @(posedge clk)
    if (c_en) begin
      if (c_we) begin mem[c_addr] <= c_wdata; writes <= writes + 1; end
      else a_rdata <= mem[c_addr];
    end

  // ---------------------------------------------------------------- PU stubs
  pu_task_t q1[$], q2[$];
  int conv_after = 0;               // answer converged on this CONV task (0 = never)
  int nconv = 0;
  int busy1 = 0, busy2 = 0;

  always @(posedge clk) begin
    p1_done <= 1'b0;
    p2_done <= 1'b0;
    if (busy1 > 0) begin busy1 <= busy1 - 1; if (busy1 == 1) p1_done <= 1'b1; end
    if (busy2 > 0) begin busy2 <= busy2 - 1; if (busy2 == 1) p2_done <= 1'b1; end
    if (p1_start) begin
      q1.push_back(p1_tsk);
      busy1 <= 1 + $urandom % 6;
      if (p1_tsk.op == T_CONV) begin nconv++; p1_conv <= (conv_after != 0 && nconv == conv_after); end
    end
    if (p2_start) begin q2.push_back(p2_tsk); busy2 <= 1 + $urandom % 6; end
  end

  int dones = 0;
  always @(posedge clk) if (done) dones++;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic issue(input opcode_e op, input int p1, input int p2, input int p3);
    @(negedge clk);
    check(instr_ready, "instr_ready when idle");
    instr = '{op: op, p1: 5'(p1), p2: 9'(p2), p3: 15'(p3)};
    instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
    check(!instr_ready, "instr_ready low while busy");
  endtask

  task automatic wait_done();
    int d0;
    d0 = dones;
    while (!done) @(negedge clk);
    @(negedge clk);
    check(dones == d0 + 1, "single done pulse");
  endtask

  function automatic string tstr(input pu_task_t t);
    return $sformatf("%s idx=%0d j=%0d sel=%0d gs_w=%0d", t.op.name(), t.idx, t.j, t.sel, t.gs_w);
  endfunction

  task automatic expect_task(ref pu_task_t q[$], input task_e op, input int idx, input int sel,
                             input int gs_w, input string who);
    pu_task_t t;
    if (q.size() == 0) begin check(1'b0, {who, ": missing task ", op.name()}); return; end
    t = q.pop_front();
    check(t.op == op && int'(t.idx) == idx && int'(t.sel) == sel && int'(t.gs_w) == gs_w,
          $sformatf("%s: got %s, expected %s idx=%0d sel=%0d gs_w=%0d", who, tstr(t), op.name(), idx, sel, gs_w));
  endtask

  logic [31:0] words[$];
  int n, wr0, iv;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = 32'hDEAD_BEEF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ------------------------------------------------ LOAD, fixed point, 3 channels
    n = 3;
    issue(OP_LOAD, n, 511, 0);
    wr0 = writes;
    for (int i = 0; i < n*M; i++) begin
      iv = int'($urandom % 8191) - 4095;
      words.push_back(32'(iv));
      din = 32'(iv); din_valid = ($urandom % 3) != 0;
      @(posedge clk);
      while (!(din_valid && din_ready)) begin
        @(negedge clk); din_valid = 1'b1; @(posedge clk);
      end
      @(negedge clk);
      din_valid = 1'b0;
    end
    wait_done();
    for (int i = 0; i < n*M; i++)
      check(mem[i] == r2f(real'($signed(words[i]))), $sformatf("LOAD fixed word %0d", i));
    check(mem[n*M] == 32'hDEAD_BEEF, "LOAD stops at n*M");
    check(writes - wr0 == n*M, "LOAD write count");

    // ------------------------------------------------ LOAD, FP32, 4 channels
    n = 4; words.delete();
    issue(OP_LOAD, n, 0, 0);
    for (int i = 0; i < n*M; i++) begin
      words.push_back($urandom);
      din = words[i]; din_valid = 1'b1;
      @(posedge clk);
      @(negedge clk);
    end
    din_valid = 1'b0;
    wait_done();
    for (int i = 0; i < n*M; i++) check(mem[i] == words[i], $sformatf("LOAD float word %0d", i));

    // ------------------------------------------------ OUTPUT signals, 2 channels
    n = 2;
    issue(OP_OUTPUT, n, 0, 0);
    for (int i = 0; i < n*M; i++) begin
      forever begin
        dout_ready = ($urandom % 2) != 0;
        if (dout_valid && dout_ready) break;
        @(negedge clk);
      end
      check(dout == words[i], $sformatf("OUTPUT signal word %0d", i));
      @(negedge clk);
      dout_ready = 1'b0;
    end
    wait_done();

    // ------------------------------------------------ FASTICA n = 3, limit 3 iterations
    q1.delete(); q2.delete(); nconv = 0; conv_after = 0;
    issue(OP_FASTICA, 3, 3, 15'h1CC0);
    wait_done();
    for (int i = 0; i < 3; i++) for (int c = 0; c < 3; c++)
      check(mem[WB0 + i*NCH + c] == ((i == c) ? 32'h3F80_0000 : 32'h0), "initial W is the identity");
    expect_task(q1, T_CENTER, 0, 0, 0, "PU1"); expect_task(q2, T_CENTER, 1, 0, 0, "PU2");
    expect_task(q1, T_CENTER, 2, 0, 0, "PU1");
    expect_task(q1, T_GS, 0, 0, 0, "PU1");
    for (int it = 0; it < 3; it++) begin
      expect_task(q1, T_UPDATE, 0, it % 2, 0, "PU1"); expect_task(q2, T_UPDATE, 1, it % 2, 0, "PU2");
      expect_task(q1, T_UPDATE, 2, it % 2, 0, "PU1");
      expect_task(q1, T_GS, 0, 1 - it % 2, 1, "PU1");
      expect_task(q1, T_CONV, 0, it % 2, 0, "PU1");
    end
    check(q1.size() == 0 && q2.size() == 0, "no extra FASTICA tasks");
    check(iter_count == 9'd3 && converged == 1'b0, $sformatf("iteration limit: count %0d conv %0d", iter_count, converged));

    // OUTPUT weights now reads bank 1 (the last one written)
    for (int i = 0; i < 3; i++) for (int c = 0; c < NCH; c++) mem[WB0 + NCH*NCH + i*NCH + c] = 32'(100*i + c);
    issue(OP_OUTPUT, 3, 511, 0);
    for (int i = 0; i < 3; i++) for (int c = 0; c < 3; c++) begin
      dout_ready = 1'b1;
      while (!dout_valid) @(negedge clk);
      check(dout == 32'(100*i + c), $sformatf("OUTPUT weight (%0d,%0d) = %0d", i, c, dout));
      @(negedge clk);
      dout_ready = 1'b0;
    end
    wait_done();

    // ------------------------------------------------ FASTICA n = 4, converges in iteration 2
    q1.delete(); q2.delete(); nconv = 0; conv_after = 2;
    issue(OP_FASTICA, 4, 50, 15'h1CC0);
    wait_done();
    check(iter_count == 9'd2 && converged == 1'b1, $sformatf("convergence stop: count %0d conv %0d", iter_count, converged));
    check(q1.size() == 2 + 1 + 2*(2 + 2) && q2.size() == 2 + 2*2, $sformatf("task counts %0d %0d", q1.size(), q2.size()));
    check(q1[q1.size()-1].op == T_CONV, "last task is CONV");

    // ------------------------------------------------ REREF n = 4, baseline 1
    q1.delete(); q2.delete();
    issue(OP_REREF, 4, 1, 0);
    wait_done();
    check(q1.size() == 2 && q2.size() == 1, "REREF task counts");
    expect_task(q1, T_REREF, 0, 0, 0, "PU1"); expect_task(q2, T_REREF, 2, 0, 0, "PU2");
    expect_task(q1, T_REREF, 3, 0, 0, "PU1");
    // baseline 0
    issue(OP_REREF, 4, 0, 0);
    wait_done();
    expect_task(q1, T_REREF, 1, 0, 0, "PU1"); expect_task(q2, T_REREF, 2, 0, 0, "PU2");
    expect_task(q1, T_REREF, 3, 0, 0, "PU1");
    check(q1.size() == 0 && q2.size() == 0, "REREF baseline 0 task counts");

    // ------------------------------------------------ SYNAVG, 4 trials
    issue(OP_SYNAVG, 4, 0, 0);
    wait_done();
    check(q1.size() == M/2 && q2.size() == M/2, "SYNAVG task counts");
    for (int k = 0; k < M/2; k++) begin
      check(q1[k].op == T_SYNAVG && q1[k].j == 10'(2*k) && q1[k].cnt == 5'd4 && q1[k].lambda == 4'd2, "SYNAVG PU1 task");
      check(q2[k].op == T_SYNAVG && q2[k].j == 10'(2*k + 1), "SYNAVG PU2 task");
    end
    q1.delete(); q2.delete();

    // ------------------------------------------------ MOVAVG, window 8 on channel 2
    issue(OP_MOVAVG, 8, 2, 0);
    wait_done();
    check(q1.size() == M/2 && q2.size() == M/2, "MOVAVG task counts");
    for (int k = 0; k < M/2; k++) begin
      check(q1[k].op == T_MOVAVG && q1[k].j == 10'(M - 1 - 2*k) && q1[k].idx == 4'd2 &&
            q1[k].cnt == 5'd8 && q1[k].lambda == 4'd3, "MOVAVG PU1 task");
      check(q2[k].op == T_MOVAVG && q2[k].j == 10'(M - 2 - 2*k) && q2[k].idx == 4'd2, "MOVAVG PU2 task");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
