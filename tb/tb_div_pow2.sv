// tb_div_pow2: checks division by 2^lambda (exponent subtraction) against
// real division, including results that fall below the normal range and must
// become a signed zero, and zero inputs.
module tb_div_pow2;
  import tb_fp_pkg::*;
  logic [31:0] x, y;
  logic [3:0]  lambda;
  int checks = 0, failures = 0;

  div_pow2 dut (.x(x), .lambda(lambda), .y(y));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      x = {1'($urandom), 8'(($urandom % 254) + 1), 23'($urandom)};
      if (i % 50 == 0) x = {1'($urandom), 8'(($urandom % 10) + 1), 23'($urandom)};   // near underflow
      if (i % 97 == 0) x = 32'h0;
      lambda = 4'($urandom);
      #1;
      checks++;
      if (y !== r2f(f2r(x) / real'(1 << lambda))) begin
        failures++;
        $display("FAIL x=%h lambda=%0d y=%h", x, lambda, y);
      end
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
