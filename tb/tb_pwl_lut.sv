// tb_pwl_lut: checks the piecewise-linear tanh table.  For random u in
// (-6, 6) the segment is worked out here from floor(4|u|), and alpha and beta
// are recomputed from the chord formula with the real tanh; they must match
// the table bit for bit (beta negated for u < 0, alpha = 0 and beta = +-1 for
// |u| >= 4).  The approximation alpha*u + beta must also stay within 0.01 of
// tanh(u).
module tb_pwl_lut;
  import tb_fp_pkg::*;
  logic [31:0] u, alpha, beta;
  int checks = 0, failures = 0;
  real ur, au, b0, ea, eb, g;
  int s;

  pwl_lut dut (.u(u), .alpha(alpha), .beta(beta));

  function automatic real th(input real v);
    return ($exp(v) - $exp(-v)) / ($exp(v) + $exp(-v));
  endfunction

  initial begin
    for (int i = 0; i < 4000; i++) begin
      ur = (real'($urandom % 1_200_001) / 100_000.0) - 6.0;
      u  = r2f(ur);
      ur = f2r(u);
      au = ur < 0 ? -ur : ur;
      s  = int'($floor(au * 4.0));
      if (s >= 16) begin ea = 0.0; eb = 1.0; end
      else begin
        b0 = 0.25 * s;
        ea = (th(b0 + 0.25) - th(b0)) / 0.25;
        eb = th(b0) - ea * b0;
      end
      if (ur < 0 && eb != 0.0) eb = -eb;   // segment 0 has beta = +0 on both sides
      #1;
      checks++;
      if (alpha !== r2f(ea) || beta !== r2f(eb)) begin
        failures++;
        $display("FAIL u=%f seg %0d alpha=%h beta=%h expected %h %h", ur, s, alpha, beta, r2f(ea), r2f(eb));
      end
      g = f2r(alpha) * ur + f2r(beta) - th(ur);
      checks++;
      if (g > 0.01 || g < -0.01) begin failures++; $display("FAIL approximation at %f: %f", ur, g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
