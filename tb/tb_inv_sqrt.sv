// tb_inv_sqrt: checks x^(-1/2) against real arithmetic (relative error below
// 1e-6) over inputs from 2^-60 to 2^60, the latency of 2 + 4*NITER = 14 cycles
// from start to done, and the zero input (infinity).
module tb_inv_sqrt;
  import tb_fp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic [31:0] x, y;
  int checks = 0, failures = 0;
  real ref_y, err;
  int lat;

  inv_sqrt dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .busy(busy), .done(done), .y(y));

  always #5 clk = ~clk;

  task automatic run(input logic [31:0] xi);
    @(negedge clk);
    x = xi; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      run({1'b0, 8'(67 + ($urandom % 121)), 23'($urandom)});
      ref_y = 1.0 / $sqrt(f2r(x));
      err = (f2r(y) - ref_y) / ref_y;
      checks++;
      if (err > 1e-6 || err < -1e-6) begin
        failures++;
        $display("FAIL x=%h y=%h rel err %e", x, y, err);
      end
      checks++;
      if (lat != 14) begin failures++; $display("FAIL latency %0d", lat); end
    end
    run(32'h0);
    checks++;
    if (y !== 32'h7F80_0000) begin failures++; $display("FAIL zero input gave %h", y); end
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
