// pu: processing unit (PU1 when HAS_GS = 1, PU2 when HAS_GS = 0).
//
// A processing unit holds one multiply-and-add (MAA) unit, a temporary memory,
// a division-by-2^lambda unit and, in PU1 only, an inverse-square-root unit and
// the Gram-Schmidt / convergence sequences, as in the source architecture.  It
// runs one task at a time for the main controller: centering one channel, the
// fixed-point update of one weight vector, Gram-Schmidt orthonormalisation of n
// vectors, the convergence sum, re-referencing one channel, or the
// synchronised / moving average of one sample index.
//
// How it works.  Every task is a short sequence of vector operations.  A
// vector operation runs the MAA unit over len elements: for each element it
// optionally reads an operand P from the data memory (one cycle), reads an
// operand Q from the data memory and an operand T from the temporary memory
// (one cycle), then computes a*b + c from a selection of P, Q, T, the scalar
// registers ACC, K, K2 and the constants 0 and 1, and writes the result to ACC,
// K, K2, the temporary memory or the data memory (one cycle).  So an element
// takes 2 cycles, or 3 when both operands come from the data memory.  The task
// sequencer below chains vector operations and the scalar steps between them
// (nonlinearity lookup, inverse square root, division by 2^lambda).  The
// operation-level steps are the source's (Sections 4.3 to 4.5); the element
// timing and the operand/result selection are this design's.
//
// Temporary memory layout for UPDATE: [0] sum of alpha, [1..n] the
// accumulators of sum_j z_j*g(w'z_j), [NCH+1..NCH+n] the weight vector w_i.
// For GS: [0..L-1] the vector being orthonormalised (L = M or n).
//
// Interface: pulse start with tsk while busy is low; done pulses for one cycle
// at the end; converged is the result of the last CONV task.  The data memory
// port (mem_*) has a one-cycle read latency.
module pu
  import fica_pkg::*;
#(
  parameter int unsigned NCH    = 16,
  parameter int unsigned M      = 512,
  parameter bit          HAS_GS = 1'b1,
  parameter int unsigned TDEPTH = HAS_GS ? M : 2*NCH + 1,
  parameter int unsigned AW     = $clog2(NCH*M + 2*NCH*NCH)
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  pu_task_t      tsk,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output f32_t          mem_wdata,
  input  f32_t          mem_rdata
);
  localparam int unsigned TAW  = $clog2(TDEPTH);
  localparam int unsigned LOGM = $clog2(M);
  localparam int unsigned WB0  = NCH*M;                 // first weight bank
  // sqrt(M) for M = 2^LOGM: 2^(LOGM/2), times sqrt(2) when LOGM is odd
  localparam f32_t SQRTM = {1'b0, 8'(127 + LOGM/2), (LOGM % 2 == 1) ? 23'h3504F3 : 23'h0};

  typedef enum logic [3:0] {
    S_P, S_Q, S_T, S_ACC, S_NACC, S_AACC, S_K, S_NK, S_K2, S_NP, S_ONE, S_ZERO
  } src_e;
  typedef enum logic [2:0] {D_ACC, D_K, D_K2, D_TMP, D_DATA} dst_e;

  typedef struct packed {
    logic [9:0]    len;
    logic          p_en;
    logic [AW-1:0] p_base;
    logic          q_en;
    logic [AW-1:0] q_base;
    logic [AW-1:0] q_str;
    logic          t_en;
    logic [TAW-1:0] t_base;
    src_e          a, b, c;
    dst_e          dst;
    logic [AW-1:0] w_base;
    logic [AW-1:0] w_str;
    logic          clr;
  } vop_t;

  typedef enum logic [1:0] {E_IDLE, E_RP, E_RQ, E_EX} eng_e;

  typedef enum logic [4:0] {
    P_IDLE,
    P_C_SUM, P_C_MEAN, P_C_SUB,
    P_RR,
    P_A_SUM, P_A_DIV, P_A_ST,
    P_U_CLR, P_U_LDW, P_U_DOT, P_U_LUT, P_U_SA, P_U_T, P_U_ACC, P_U_SAL, P_U_FIN,
    P_G_INIT, P_G_DOT, P_G_SUB, P_G_NRM, P_G_ISQ, P_G_SCL, P_G_SQM,
    P_V_DOT, P_V_ACC, P_V_FIN, P_V_CMP
  } phase_e;

  // ---------------------------------------------------------------- state
  phase_e        ph;
  pu_task_t      tk;
  logic          vact;      // a vector operation was launched for this phase
  logic          vstart, vdone;
  vop_t          cfg;
  eng_e          es;
  logic [9:0]    e;
  logic [AW-1:0] pa, qa, wa;
  logic [TAW-1:0] ta;
  f32_t          acc, k, k2, p_op;
  logic [9:0]    jj;
  logic [4:0]    vi, vk;
  logic          isq_go;

  // ---------------------------------------------------------------- datapath
  f32_t t_rdata, op_a, op_b, op_c, maa_y, alpha, beta, dv;
  logic [3:0] lam;
  f32_t isq_y;
  logic isq_busy, isq_done;

  function automatic f32_t pick(input src_e s, input f32_t p, input f32_t q, input f32_t t,
                                input f32_t ac, input f32_t kk, input f32_t kk2);
    unique case (s)
      S_P:    return p;
      S_Q:    return q;
      S_T:    return t;
      S_ACC:  return ac;
      S_NACC: return {~ac[31], ac[30:0]};
      S_AACC: return {1'b0, ac[30:0]};
      S_K:    return kk;
      S_NK:   return {~kk[31], kk[30:0]};
      S_K2:   return kk2;
      S_NP:   return {~p[31], p[30:0]};
      S_ONE:  return F_ONE;
      default: return F_ZERO;
    endcase
  endfunction

  always_comb begin
    op_a = pick(cfg.a, p_op, mem_rdata, t_rdata, acc, k, k2);
    op_b = pick(cfg.b, p_op, mem_rdata, t_rdata, acc, k, k2);
    op_c = pick(cfg.c, p_op, mem_rdata, t_rdata, acc, k, k2);
  end

  maa_unit u_maa (.a(op_a), .b(op_b), .c(op_c), .y(maa_y));

  assign lam = (tk.op == T_CENTER) ? 4'(LOGM) : tk.lambda;
  div_pow2 u_div (.x(acc), .lambda(lam), .y(dv));

  pwl_lut u_lut (.u(acc), .alpha(alpha), .beta(beta));

  temp_mem #(.DEPTH(TDEPTH)) u_tmp (
    .clk  (clk),
    .we   (es == E_EX && cfg.dst == D_TMP),
    .waddr(wa[TAW-1:0]),
    .wdata(maa_y),
    .re   (es == E_RQ && cfg.t_en),
    .raddr(ta),
    .rdata(t_rdata)
  );

  generate
    if (HAS_GS) begin : g_isq
      inv_sqrt u_isq (.clk(clk), .rst_n(rst_n), .start(isq_go), .x(acc),
                      .busy(isq_busy), .done(isq_done), .y(isq_y));
    end else begin : g_noisq
      assign isq_busy = 1'b0;
      assign isq_done = 1'b0;
      assign isq_y    = F_ZERO;
    end
  endgenerate

  // data memory port
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = wa;
    mem_wdata = maa_y;
    unique case (es)
      E_RP: begin mem_en = cfg.p_en; mem_addr = pa; end
      E_RQ: begin mem_en = cfg.q_en; mem_addr = qa; end
      E_EX: begin mem_en = (cfg.dst == D_DATA); mem_we = (cfg.dst == D_DATA); mem_addr = wa; end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- address helpers
  function automatic logic [AW-1:0] sig_a(input logic [4:0] ch, input logic [9:0] j);
    return AW'(ch) * AW'(M) + AW'(j);
  endfunction
  function automatic logic [AW-1:0] w_a(input logic s, input logic [4:0] i);
    return AW'(WB0) + AW'(s) * AW'(NCH*NCH) + AW'(i) * AW'(NCH);
  endfunction
  function automatic logic [AW-1:0] vb(input pu_task_t t, input logic [4:0] i);
    return t.gs_w ? w_a(t.sel, i) : sig_a(i, 10'd0);
  endfunction

  // ---------------------------------------------------------------- engine + sequencer
  logic [9:0] glen, mlen;
  always_comb begin
    glen = tk.gs_w ? 10'(tk.n) : 10'(M);                                // GS vector length
    mlen = (10'(tk.cnt) > tk.j + 10'd1) ? tk.j + 10'd1 : 10'(tk.cnt);   // MOVAVG terms
  end

  always_ff @(posedge clk or negedge rst_n) begin
    vop_t nc;
    if (!rst_n) begin
      nc = '0;
      ph <= P_IDLE; tk <= '0; vact <= 1'b0; vstart <= 1'b0; vdone <= 1'b0;
      cfg <= '0; es <= E_IDLE; e <= '0; pa <= '0; qa <= '0; wa <= '0; ta <= '0;
      acc <= F_ZERO; k <= F_ZERO; k2 <= F_ZERO; p_op <= F_ZERO;
      jj <= '0; vi <= '0; vk <= '0; isq_go <= 1'b0; done <= 1'b0; converged <= 1'b0;
    end else begin
      // ------------------------------------------------ vector engine
      vstart <= 1'b0;
      vdone  <= 1'b0;
      unique case (es)
        E_IDLE: if (vstart) begin
          e  <= '0;
          pa <= cfg.p_base; qa <= cfg.q_base; ta <= cfg.t_base; wa <= cfg.w_base;
          if (cfg.clr) acc <= F_ZERO;
          es <= cfg.p_en ? E_RP : E_RQ;
        end
        E_RP: es <= E_RQ;
        E_RQ: begin
          if (cfg.p_en) p_op <= mem_rdata;
          es <= E_EX;
        end
        E_EX: begin
          unique case (cfg.dst)
            D_ACC: acc <= maa_y;
            D_K:   k   <= maa_y;
            D_K2:  k2  <= maa_y;
            default: ;
          endcase
          e  <= e + 10'd1;
          pa <= pa + AW'(1);
          qa <= qa + cfg.q_str;
          ta <= ta + TAW'(1);
          wa <= wa + cfg.w_str;
          if (e == cfg.len - 10'd1) begin
            es    <= E_IDLE;
            vdone <= 1'b1;
          end else es <= cfg.p_en ? E_RP : E_RQ;
        end
        default: es <= E_IDLE;
      endcase

      // ------------------------------------------------ task sequencer
      done   <= 1'b0;
      isq_go <= 1'b0;
      nc = '0;
      nc.q_str = AW'(1);
      nc.w_str = AW'(1);
      nc.a = S_ZERO; nc.b = S_ZERO; nc.c = S_ZERO;
      nc.dst = D_ACC;
      nc.len = 10'd1;

      unique case (ph)
        P_IDLE: if (start) begin
          tk <= tsk;
          jj <= '0; vi <= '0; vk <= '0;
          unique case (tsk.op)
            T_CENTER: ph <= P_C_SUM;
            T_REREF:  ph <= P_RR;
            T_SYNAVG, T_MOVAVG: ph <= P_A_SUM;
            T_UPDATE: ph <= P_U_CLR;
            T_GS:     ph <= HAS_GS ? P_G_INIT : P_IDLE;
            T_CONV:   begin ph <= HAS_GS ? P_V_DOT : P_IDLE; k2 <= F_ZERO; end
            default:  ph <= P_IDLE;
          endcase
          if (!HAS_GS && (tsk.op == T_GS || tsk.op == T_CONV)) done <= 1'b1;
          if (tsk.op == T_NONE || tsk.op > T_MOVAVG) done <= 1'b1;
        end

        // ---------- centering: x_i(j) - (sum_l x_i(l)) / 2^LOGM
        P_C_SUM: if (!vact) begin
          nc.len = 10'(M); nc.q_en = 1'b1; nc.q_base = sig_a(5'(tk.idx), 10'd0);
          nc.a = S_Q; nc.b = S_ONE; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_C_MEAN; end
        P_C_MEAN: begin k <= {~dv[31], dv[30:0]}; ph <= P_C_SUB; end
        P_C_SUB: if (!vact) begin
          nc.len = 10'(M); nc.q_en = 1'b1; nc.q_base = sig_a(5'(tk.idx), 10'd0);
          nc.a = S_Q; nc.b = S_ONE; nc.c = S_K; nc.dst = D_DATA; nc.w_base = sig_a(5'(tk.idx), 10'd0);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_IDLE; done <= 1'b1; end

        // ---------- re-reference: x_i(j) - x_base(j)
        P_RR: if (!vact) begin
          nc.len = 10'(M);
          nc.p_en = 1'b1; nc.p_base = sig_a(5'(tk.idx2), 10'd0);
          nc.q_en = 1'b1; nc.q_base = sig_a(5'(tk.idx), 10'd0);
          nc.a = S_Q; nc.b = S_ONE; nc.c = S_NP; nc.dst = D_DATA; nc.w_base = sig_a(5'(tk.idx), 10'd0);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_IDLE; done <= 1'b1; end

        // ---------- synchronised / moving average of one sample index
        P_A_SUM: if (!vact) begin
          nc.q_en = 1'b1;
          if (tk.op == T_SYNAVG) begin
            nc.len = 10'(tk.cnt); nc.q_base = sig_a(5'd0, tk.j); nc.q_str = AW'(M);
          end else begin
            nc.len = mlen; nc.q_base = sig_a(5'(tk.idx), tk.j + 10'd1 - mlen);
          end
          nc.a = S_Q; nc.b = S_ONE; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_A_DIV; end
        P_A_DIV: begin k <= dv; ph <= P_A_ST; end
        P_A_ST: if (!vact) begin
          nc.a = S_K; nc.b = S_ONE; nc.c = S_ZERO; nc.dst = D_DATA;
          nc.w_base = (tk.op == T_SYNAVG) ? sig_a(5'd0, tk.j) : sig_a(5'(tk.idx), tk.j);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_IDLE; done <= 1'b1; end

        // ---------- fixed-point update of w_i (eq. 29, Steps 1-7 of Sec. 4.4)
        P_U_CLR: if (!vact) begin      // sum alpha and accumulators <- 0
          nc.len = 10'(tk.n) + 10'd1; nc.dst = D_TMP; nc.w_base = '0;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_LDW; end
        P_U_LDW: if (!vact) begin      // w_i into the temporary memory
          nc.len = 10'(tk.n); nc.q_en = 1'b1; nc.q_base = w_a(tk.sel, 5'(tk.idx));
          nc.a = S_Q; nc.b = S_ONE; nc.dst = D_TMP; nc.w_base = AW'(NCH + 1);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_DOT; end
        P_U_DOT: if (!vact) begin      // y = w_i' z_j
          nc.len = 10'(tk.n); nc.q_en = 1'b1; nc.q_base = sig_a(5'd0, jj); nc.q_str = AW'(M);
          nc.t_en = 1'b1; nc.t_base = TAW'(NCH + 1);
          nc.a = S_Q; nc.b = S_T; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_LUT; end
        P_U_LUT: begin k <= alpha; k2 <= beta; ph <= P_U_SA; end
        P_U_SA: if (!vact) begin       // sum alpha += alpha
          nc.t_en = 1'b1; nc.t_base = '0;
          nc.a = S_K; nc.b = S_ONE; nc.c = S_T; nc.dst = D_TMP; nc.w_base = '0;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_T; end
        P_U_T: if (!vact) begin        // t = alpha*y + beta
          nc.a = S_ACC; nc.b = S_K; nc.c = S_K2; nc.dst = D_K;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_ACC; end
        P_U_ACC: if (!vact) begin      // acc_c += z_c(j) * t
          nc.len = 10'(tk.n); nc.q_en = 1'b1; nc.q_base = sig_a(5'd0, jj); nc.q_str = AW'(M);
          nc.t_en = 1'b1; nc.t_base = TAW'(1);
          nc.a = S_Q; nc.b = S_K; nc.c = S_T; nc.dst = D_TMP; nc.w_base = AW'(1);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin
          vact <= 1'b0;
          jj   <= jj + 10'd1;
          ph   <= (jj == 10'(M - 1)) ? P_U_SAL : P_U_DOT;
        end
        P_U_SAL: if (!vact) begin      // K <- sum alpha
          nc.t_en = 1'b1; nc.t_base = '0;
          nc.a = S_T; nc.b = S_ONE; nc.dst = D_K;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_U_FIN; end
        P_U_FIN: if (!vact) begin      // w_i+ = acc - (sum alpha) w_i, into the other bank
          nc.len = 10'(tk.n); nc.q_en = 1'b1; nc.q_base = w_a(tk.sel, 5'(tk.idx));
          nc.t_en = 1'b1; nc.t_base = TAW'(1);
          nc.a = S_NK; nc.b = S_Q; nc.c = S_T; nc.dst = D_DATA; nc.w_base = w_a(~tk.sel, 5'(tk.idx));
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_IDLE; done <= 1'b1; end

        // ---------- Gram-Schmidt (Steps 1-9 of Sec. 4.3, or eqs. 30-31)
        P_G_INIT: if (!vact) begin     // temp <- v_k
          nc.len = glen; nc.q_en = 1'b1; nc.q_base = vb(tk, vk);
          nc.a = S_Q; nc.b = S_ONE; nc.dst = D_TMP; nc.w_base = '0;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; vi <= '0; ph <= (vk == 5'd0) ? P_G_NRM : P_G_DOT; end
        P_G_DOT: if (!vact) begin      // d = v_k' v_i+
          nc.len = glen; nc.p_en = 1'b1; nc.p_base = vb(tk, vk);
          nc.q_en = 1'b1; nc.q_base = vb(tk, vi);
          nc.a = S_P; nc.b = S_Q; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_G_SUB; end
        P_G_SUB: if (!vact) begin      // temp <- temp - d v_i+
          nc.len = glen; nc.q_en = 1'b1; nc.q_base = vb(tk, vi);
          nc.t_en = 1'b1; nc.t_base = '0;
          nc.a = S_Q; nc.b = S_NACC; nc.c = S_T; nc.dst = D_TMP; nc.w_base = '0;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin
          vact <= 1'b0;
          vi   <= vi + 5'd1;
          ph   <= (vi + 5'd1 == vk) ? P_G_NRM : P_G_DOT;
        end
        P_G_NRM: if (!vact) begin      // s = temp' temp
          nc.len = glen; nc.t_en = 1'b1; nc.t_base = '0;
          nc.a = S_T; nc.b = S_T; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_G_ISQ; end
        P_G_ISQ: if (!vact) begin
          isq_go <= 1'b1; vact <= 1'b1;
        end else if (isq_done) begin vact <= 1'b0; k <= isq_y; ph <= P_G_SCL; end
        P_G_SCL: if (!vact) begin      // v_k+ = temp * s^-1/2
          nc.len = glen; nc.t_en = 1'b1; nc.t_base = '0;
          nc.a = S_T; nc.b = S_K; nc.dst = D_DATA; nc.w_base = vb(tk, vk);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin
          vact <= 1'b0;
          vk   <= vk + 5'd1;
          if (vk + 5'd1 == tk.n) begin
            if (tk.gs_w) begin ph <= P_IDLE; done <= 1'b1; end
            else begin ph <= P_G_SQM; vk <= '0; k <= SQRTM; end
          end else ph <= P_G_INIT;
        end
        P_G_SQM: if (!vact) begin      // z_k = sqrt(M) z_k+
          nc.len = glen; nc.q_en = 1'b1; nc.q_base = vb(tk, vk);
          nc.a = S_Q; nc.b = S_K; nc.dst = D_DATA; nc.w_base = vb(tk, vk);
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin
          vact <= 1'b0;
          vk   <= vk + 5'd1;
          if (vk + 5'd1 == tk.n) begin ph <= P_IDLE; done <= 1'b1; end
        end

        // ---------- convergence: n - sum_i |w_old_i' w_new_i| < threshold
        P_V_DOT: if (!vact) begin
          nc.len = 10'(tk.n); nc.p_en = 1'b1; nc.p_base = w_a(tk.sel, vi);
          nc.q_en = 1'b1; nc.q_base = w_a(~tk.sel, vi);
          nc.a = S_P; nc.b = S_Q; nc.c = S_ACC; nc.dst = D_ACC; nc.clr = 1'b1;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_V_ACC; end
        P_V_ACC: if (!vact) begin
          nc.a = S_AACC; nc.b = S_ONE; nc.c = S_K2; nc.dst = D_K2;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin
          vact <= 1'b0;
          vi   <= vi + 5'd1;
          if (vi + 5'd1 == tk.n) begin ph <= P_V_FIN; k <= int_to_f32(32'(tk.n)); end
          else ph <= P_V_DOT;
        end
        P_V_FIN: if (!vact) begin      // acc = total - n
          nc.a = S_K2; nc.b = S_ONE; nc.c = S_NK; nc.dst = D_ACC;
          cfg <= nc; vstart <= 1'b1; vact <= 1'b1;
        end else if (vdone) begin vact <= 1'b0; ph <= P_V_CMP; end
        P_V_CMP: begin
          converged <= !acc[31] || fp_abs_lt(acc, {1'b0, tk.thr[13:0], 17'd0});
          ph   <= P_IDLE;
          done <= 1'b1;
        end
        default: ph <= P_IDLE;
      endcase
    end
  end

  assign busy = (ph != P_IDLE);

  // a task is only issued to an idle unit
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
