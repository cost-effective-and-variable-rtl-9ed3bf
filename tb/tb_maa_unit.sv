// tb_maa_unit: checks y = a*b + c of the multiply-and-add unit against a
// reference built from real arithmetic: the product and the sum are each
// rounded to binary32 (round to nearest even).  Operands are random normal
// numbers whose exponents stay within a range where the double-precision sum is
// exact, so the reference is exact; special cases (b = 1, c = 0, exact
// cancellation, zero operand) are added.
module tb_maa_unit;
  import tb_fp_pkg::*;
  logic [31:0] a, b, c, y;
  int checks = 0, failures = 0;

  maa_unit dut (.a(a), .b(b), .c(c), .y(y));

  function automatic logic [31:0] rnd(input int emin, input int emax);
    return {1'($urandom), 8'(127 + emin + int'($urandom % (emax - emin + 1))), 23'($urandom)};
  endfunction

  task automatic chk(input logic [31:0] exp_y, input string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h y=%h expected %h", what, a, b, c, y, exp_y);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = rnd(-6, 6); b = rnd(-6, 6); c = rnd(-8, 8);
      chk(r2f(f2r(r2f(f2r(a) * f2r(b))) + f2r(c)), "random");
    end
    for (int i = 0; i < 300; i++) begin
      a = rnd(-20, 20); b = 32'h3F80_0000; c = {~a[31], a[30:0]};
      chk(32'h0, "cancellation");
      c = 32'h0; b = rnd(-20, 20);
      chk(r2f(f2r(a) * f2r(b)), "product only");
      b = 32'h0; c = rnd(-20, 20);
      chk(c, "zero product");
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
