// inv_sqrt: single-precision inverse square root, y = x^(-1/2).
//
// Used by PU1 to normalise a vector: the squared norm comes from the MAA unit
// and its inverse square root scales the vector.  The source architecture takes
// this unit from earlier work without describing it; this implementation is
// the simplest iterative form: a bit-level initial estimate
// y0 = 0x5F3759DF - (x >> 1) followed by NITER Newton-Raphson steps
// y <- y * (1.5 - 0.5*x*y*y), one floating-point operation per cycle
// (4 per step after one cycle to form -0.5*x).
// Interface: pulse start with x; busy is high while computing; done pulses for
// one cycle with y valid (y holds until the next start).  Latency 2 + 4*NITER
// cycles.  x = 0 gives +infinity; negative x is not expected (squared norms).
module inv_sqrt
  import fica_pkg::*;
#(
  parameter int unsigned NITER = 3
)(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  f32_t x,
  output logic busy,
  output logic done,
  output f32_t y
);
  typedef enum logic [2:0] {S_IDLE, S_HALF, S_SQ, S_MUL, S_ADD, S_UPD} state_e;
  state_e st;
  f32_t xr, mh, t;
  logic [3:0] it;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; y <= F_ZERO; xr <= F_ZERO; mh <= F_ZERO; t <= F_ZERO; it <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          xr <= x;
          if (x[30:23] == 8'd0) begin        // zero: infinite result
            y <= 32'h7F80_0000; done <= 1'b1;
          end else begin
            y  <= 32'h5F37_59DF - {1'b0, x[31:1]};
            st <= S_HALF;
          end
        end
        S_HALF: begin mh <= fp_mul(xr, F_MHALF); it <= '0; st <= S_SQ; end
        S_SQ:   begin t <= fp_mul(y, y);        st <= S_MUL; end
        S_MUL:  begin t <= fp_mul(mh, t);       st <= S_ADD; end
        S_ADD:  begin t <= fp_add(t, F_1P5);    st <= S_UPD; end
        S_UPD:  begin
          y  <= fp_mul(y, t);
          it <= it + 4'd1;
          if (it == 4'(NITER - 1)) begin st <= S_IDLE; done <= 1'b1; end
          else st <= S_SQ;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy = (st != S_IDLE);
endmodule
