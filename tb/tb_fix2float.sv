// tb_fix2float: checks the integer-to-binary32 converter against the
// real-arithmetic reference for small ADC-range values, large values that need
// rounding (ties included), the most negative value and zero.
module tb_fix2float;
  import tb_fp_pkg::*;
  logic [31:0] x, y;
  int checks = 0, failures = 0;

  fix2float dut (.x(x), .y(y));

  task automatic chk();
    #1;
    checks++;
    if (y !== r2f(real'($signed(x)))) begin
      failures++;
      $display("FAIL x=%0d y=%h expected %h", $signed(x), y, r2f(real'($signed(x))));
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin x = 32'(int'($urandom % 4096) - 2048); chk(); end
    for (int i = 0; i < 2000; i++) begin x = $urandom; chk(); end
    for (int i = 0; i < 200; i++)  begin x = {8'(i), 24'h000080} | 32'h1000_0000; chk(); end  // ties
    x = 32'h8000_0000; chk();
    x = 32'h0; chk();
    x = 32'h7FFF_FFFF; chk();
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
