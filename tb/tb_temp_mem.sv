// tb_temp_mem: random writes and reads of the temporary memory against a
// model array; checks the one-cycle read latency and that rdata holds while re
// is low.
module tb_temp_mem;
  localparam int DEPTH = 64;
  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata, held;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  temp_mem #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                 .re(re), .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1'b1; waddr = 6'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = $urandom;
      re = 1'b1; raddr = 6'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== model[raddr]) begin failures++; $display("FAIL read %0d", raddr); end
      if (we) model[waddr] = wdata;
      we = 1'b0; re = 1'b0; held = rdata;
      @(negedge clk);
      checks++;
      if (rdata !== held) begin failures++; $display("FAIL hold"); end
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
