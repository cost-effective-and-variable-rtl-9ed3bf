// fastica_ctrl: instruction decoder and main controller.
//
// Accepts one 32-bit instruction at a time ({op, p1, p2, p3}, see fica_pkg) and
// runs it to completion:
//   LOAD    p1 = channels, p2 = 511 for fixed-point input (converted to FP32
//           on the way in), anything else for FP32 input.  n*M words are taken
//           from din, channel after channel, sample 0 first.
//   OUTPUT  p1 = channels, p2 = 511 for the weight matrix (n vectors of n
//           components, w_1 first), anything else for n*M signal words.
//   FASTICA p1 = channels n (2..16), p2 = maximum iterations, p3 = threshold
//           (upper 15 bits of an FP32 number).  Centering on PU1 and PU2 two
//           channels at a time, Gram-Schmidt whitening on PU1, then iterations
//           of: update of w_1..w_n, two at a time on PU1 and PU2;
//           Gram-Schmidt orthonormalisation of the new W on PU1; convergence
//           test on PU1.  It stops when n - sum_i |w_old_i . w_new_i| is below
//           the threshold or after the maximum number of iterations.
//   REREF   p1 = channels, p2 = baseline channel.  Every other channel becomes
//           x_i - x_baseline, two channels at a time on PU1 and PU2; the
//           baseline channel is left as it is.
//   SYNAVG  p1 = trials h (2/4/8/16, stored as channels 0..h-1).  Channel 0
//           becomes the average of the trials; PU1 and PU2 take alternate
//           sample indices.
//   MOVAVG  p1 = window r (2/4/8/16), p2 = target channel.  The target channel
//           is replaced by its r-point moving average (samples before the
//           first count as zero), computed from the last sample backwards so
//           that it can be done in place; PU1 and PU2 take alternate indices.
// The instruction set, the field widths and the PU1/PU2 work split follow the
// source architecture.  Field placement (op in the top bits), the data-port
// handshakes, the identity start value for W, the in-place result locations,
// the convergence rule and the handling of the baseline channel are this
// design's choices.
//
// Interface: instr is taken when instr_valid and instr_ready are both high.
// din/dout use valid/ready handshakes (one LOAD word per cycle, one OUTPUT
// word per two cycles).  done pulses for one cycle when an instruction ends.
// The controller uses data-memory port A only while PU1 is idle; the top
// multiplexes that port.
module fastica_ctrl
  import fica_pkg::*;
#(
  parameter int unsigned NCH = 16,
  parameter int unsigned M   = 512,
  parameter int unsigned AW  = $clog2(NCH*M + 2*NCH*NCH)
)(
  input  logic          clk,
  input  logic          rst_n,
  // instruction port
  input  instr_t        instr,
  input  logic          instr_valid,
  output logic          instr_ready,
  output logic          done,
  // data in / out
  input  logic [31:0]   din,
  input  logic          din_valid,
  output logic          din_ready,
  output f32_t          dout,
  output logic          dout_valid,
  input  logic          dout_ready,
  // FastICA status
  output logic          converged,
  output logic [8:0]    iter_count,
  // processing units
  output logic          p1_start,
  output pu_task_t      p1_tsk,
  input  logic          p1_done,
  input  logic          p1_conv,
  output logic          p2_start,
  output pu_task_t      p2_tsk,
  input  logic          p2_done,
  // data memory port A (controller side)
  output logic          c_en,
  output logic          c_we,
  output logic [AW-1:0] c_addr,
  output f32_t          c_wdata,
  input  f32_t          a_rdata
);
  localparam int unsigned WB0 = NCH*M;

  typedef enum logic [4:0] {
    C_IDLE, C_LOAD, C_OUT_RD, C_OUT_V,
    C_F_INITW, C_F_CENT, C_F_GSZ, C_F_UPD, C_F_GSW, C_F_CONV, C_F_CHK,
    C_RR, C_SA, C_MA, C_WAIT, C_END
  } cstate_e;

  cstate_e       st, ret;
  instr_t        ir;
  logic [4:0]    n;
  logic [AW-1:0] ptr;
  logic [4:0]    oi, oc, cc;
  logic [9:0]    jj;
  logic          sel, e1, e2, g1, g2;
  f32_t          fx;

  fix2float #(.W(32), .FRAC(0)) u_f2f (.x(din), .y(fx));

  function automatic logic [3:0] log2_4(input logic [4:0] v);
    if (v[4]) return 4'd4;
    if (v[3]) return 4'd3;
    if (v[2]) return 4'd2;
    if (v[1]) return 4'd1;
    return 4'd0;
  endfunction

  function automatic logic [4:0] skip(input logic [4:0] ch, input logic [3:0] base);
    return (ch == 5'(base)) ? ch + 5'd1 : ch;
  endfunction

  function automatic pu_task_t mk(input task_e op, input logic [4:0] nn, input logic [3:0] idx,
                                  input logic [9:0] j, input logic s, input instr_t i);
    pu_task_t t;
    t        = '0;
    t.op     = op;
    t.n      = nn;
    t.idx    = idx;
    t.idx2   = i.p2[3:0];
    t.j      = j;
    t.cnt    = i.p1;
    t.lambda = log2_4(i.p1);
    t.sel    = s;
    t.thr    = i.p3;
    return t;
  endfunction

  // memory port A and data ports
  always_comb begin
    c_en    = 1'b0;
    c_we    = 1'b0;
    c_addr  = ptr;
    c_wdata = (ir.p2 == 9'h1FF) ? fx : din;
    din_ready   = (st == C_LOAD);
    dout_valid  = (st == C_OUT_V);
    dout        = a_rdata;
    instr_ready = (st == C_IDLE);
    unique case (st)
      C_LOAD:   begin c_en = din_valid; c_we = din_valid; end
      C_OUT_RD: c_en = 1'b1;
      C_F_INITW: begin
        c_en = 1'b1; c_we = 1'b1;
        c_addr  = AW'(WB0) + AW'(oi) * AW'(NCH) + AW'(oc);
        c_wdata = (oi == oc) ? F_ONE : F_ZERO;
      end
      default: ;
    endcase
  end

  // REREF: the next two channels, skipping the baseline
  logic [4:0] a, b;
  always_comb begin
    a = skip(cc, ir.p2[3:0]);
    b = skip(a + 5'd1, ir.p2[3:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; ret <= C_IDLE; ir <= '0; n <= '0; ptr <= '0;
      oi <= '0; oc <= '0; cc <= '0; jj <= '0; sel <= 1'b0;
      e1 <= 1'b0; e2 <= 1'b0; g1 <= 1'b0; g2 <= 1'b0;
      p1_start <= 1'b0; p2_start <= 1'b0; p1_tsk <= '0; p2_tsk <= '0;
      done <= 1'b0; converged <= 1'b0; iter_count <= '0;
    end else begin
      p1_start <= 1'b0;
      p2_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        C_IDLE: if (instr_valid) begin
          ir  <= instr;
          n   <= (instr.p1 > 5'(NCH)) ? 5'(NCH) : instr.p1;
          ptr <= '0; oi <= '0; oc <= '0; cc <= '0;
          unique case (instr.op)
            OP_LOAD:    st <= C_LOAD;
            OP_OUTPUT:  begin
              st  <= C_OUT_RD;
              if (instr.p2 == 9'h1FF) ptr <= AW'(WB0) + AW'(sel) * AW'(NCH*NCH);
            end
            OP_FASTICA: begin st <= C_F_INITW; converged <= 1'b0; iter_count <= '0; end
            OP_REREF:   st <= C_RR;
            OP_SYNAVG:  begin st <= C_SA; jj <= '0; end
            OP_MOVAVG:  begin st <= C_MA; jj <= 10'(M - 1); end
            default:    st <= C_END;
          endcase
        end

        C_LOAD: if (din_valid) begin
          ptr <= ptr + AW'(1);
          if (ptr == AW'(n) * AW'(M) - AW'(1)) st <= C_END;
        end

        C_OUT_RD: st <= C_OUT_V;
        C_OUT_V: if (dout_ready) begin
          st <= C_OUT_RD;
          if (ir.p2 == 9'h1FF) begin
            // weights: n vectors of n components inside the NCH x NCH bank
            if (oc == n - 5'd1) begin
              oc  <= '0;
              oi  <= oi + 5'd1;
              ptr <= ptr + AW'(NCH) - AW'(n) + AW'(1);
              if (oi == n - 5'd1) st <= C_END;
            end else begin
              oc  <= oc + 5'd1;
              ptr <= ptr + AW'(1);
            end
          end else begin
            ptr <= ptr + AW'(1);
            if (ptr == AW'(n) * AW'(M) - AW'(1)) st <= C_END;
          end
        end

        // ------------------------------------------------ FASTICA
        C_F_INITW: begin                  // W <- identity in bank 0
          sel <= 1'b0;
          if (oc == n - 5'd1) begin
            oc <= '0; oi <= oi + 5'd1;
            if (oi == n - 5'd1) begin st <= C_F_CENT; cc <= '0; end
          end else oc <= oc + 5'd1;
        end
        C_F_CENT: begin                   // centering, channels cc and cc+1
          p1_start <= 1'b1; p1_tsk <= mk(T_CENTER, n, cc[3:0], '0, sel, ir); e1 <= 1'b1;
          p2_start <= (cc + 5'd1 < n); p2_tsk <= mk(T_CENTER, n, 4'(cc + 5'd1), '0, sel, ir);
          e2 <= (cc + 5'd1 < n);
          cc <= cc + 5'd2;
          ret <= (cc + 5'd2 >= n) ? C_F_GSZ : C_F_CENT;
          st <= C_WAIT;
        end
        C_F_GSZ: begin                    // Gram-Schmidt whitening
          p1_start <= 1'b1; p1_tsk <= mk(T_GS, n, '0, '0, sel, ir); e1 <= 1'b1; e2 <= 1'b0;
          cc <= '0; ret <= C_F_UPD; st <= C_WAIT;
        end
        C_F_UPD: begin                    // update w_cc, w_cc+1
          p1_start <= 1'b1; p1_tsk <= mk(T_UPDATE, n, cc[3:0], '0, sel, ir); e1 <= 1'b1;
          p2_start <= (cc + 5'd1 < n); p2_tsk <= mk(T_UPDATE, n, 4'(cc + 5'd1), '0, sel, ir);
          e2 <= (cc + 5'd1 < n);
          cc <= cc + 5'd2;
          ret <= (cc + 5'd2 >= n) ? C_F_GSW : C_F_UPD;
          st <= C_WAIT;
        end
        C_F_GSW: begin                    // orthonormalise the new W
          p1_start <= 1'b1; p1_tsk <= mk(T_GS, n, '0, '0, ~sel, ir);
          p1_tsk.gs_w <= 1'b1;
          e1 <= 1'b1; e2 <= 1'b0; ret <= C_F_CONV; st <= C_WAIT;
        end
        C_F_CONV: begin
          p1_start <= 1'b1; p1_tsk <= mk(T_CONV, n, '0, '0, sel, ir); e1 <= 1'b1; e2 <= 1'b0;
          ret <= C_F_CHK; st <= C_WAIT;
        end
        C_F_CHK: begin
          sel        <= ~sel;
          iter_count <= iter_count + 9'd1;
          converged  <= p1_conv;
          cc         <= '0;
          if (p1_conv || iter_count + 9'd1 >= ir.p2) st <= C_END;
          else st <= C_F_UPD;
        end

        // ------------------------------------------------ REREF
        C_RR: if (a >= n) st <= C_END;
        else begin
          p1_start <= 1'b1; p1_tsk <= mk(T_REREF, n, a[3:0], '0, sel, ir); e1 <= 1'b1;
          p2_start <= (b < n); p2_tsk <= mk(T_REREF, n, b[3:0], '0, sel, ir); e2 <= (b < n);
          cc <= b + 5'd1; ret <= C_RR; st <= C_WAIT;
        end

        // ------------------------------------------------ SYNAVG
        C_SA: begin
          p1_start <= 1'b1; p1_tsk <= mk(T_SYNAVG, n, '0, jj, sel, ir); e1 <= 1'b1;
          p2_start <= 1'b1; p2_tsk <= mk(T_SYNAVG, n, '0, jj + 10'd1, sel, ir); e2 <= 1'b1;
          jj  <= jj + 10'd2;
          ret <= (jj + 10'd2 >= 10'(M)) ? C_END : C_SA;
          st  <= C_WAIT;
        end

        // ------------------------------------------------ MOVAVG (last sample first)
        C_MA: begin
          p1_start <= 1'b1; p1_tsk <= mk(T_MOVAVG, n, ir.p2[3:0], jj, sel, ir); e1 <= 1'b1;
          p2_start <= 1'b1; p2_tsk <= mk(T_MOVAVG, n, ir.p2[3:0], jj - 10'd1, sel, ir); e2 <= 1'b1;
          jj  <= jj - 10'd2;
          ret <= (jj == 10'd1) ? C_END : C_MA;
          st  <= C_WAIT;
        end

        C_WAIT: begin
          if ((!e1 || g1 || p1_done) && (!e2 || g2 || p2_done)) begin
            st <= ret; g1 <= 1'b0; g2 <= 1'b0;
          end else begin
            if (p1_done) g1 <= 1'b1;
            if (p2_done) g2 <= 1'b1;
          end
        end

        C_END: begin done <= 1'b1; st <= C_IDLE; end
        default: st <= C_IDLE;
      endcase
    end
  end

  // an instruction is only taken when idle; the FASTICA channel count is 2..16
  assert property (@(posedge clk) disable iff (!rst_n)
    (st == C_IDLE && instr_valid && instr.op == OP_FASTICA) |-> (instr.p1 >= 5'd2));
endmodule
