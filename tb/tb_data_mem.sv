// tb_data_mem: both ports of the data memory do random reads and writes
// against a model, at a reduced size (NCH = 4, M = 32).  Checks the one-cycle
// read latency on each port, that a word written by one port is read by the
// other, and that port A wins when both ports write the same address.
module tb_data_mem;
  localparam int NCH = 4, M = 32, DEPTH = NCH*M + 2*NCH*NCH, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;
  int ra, rb;
  bit rda, rdb;

  data_mem #(.NCH(NCH), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); a_addr = AW'($urandom % DEPTH); a_wdata = $urandom;
      b_en = 1; b_we = 1'($urandom); b_addr = AW'($urandom % DEPTH); b_wdata = $urandom;
      if (i % 16 == 0) begin a_we = 1; b_we = 1; b_addr = a_addr; end   // write collision
      rda = !a_we; ra = a_addr; rdb = !b_we; rb = b_addr;
      @(negedge clk);
      if (rda) begin checks++; if (a_rdata !== model[ra]) begin failures++; $display("FAIL A read %0d", ra); end end
      if (rdb) begin checks++; if (b_rdata !== model[rb]) begin failures++; $display("FAIL B read %0d", rb); end end
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      a_en = 0; b_en = 0;
      if (i % 16 == 0) begin
        @(negedge clk); a_en = 1; a_we = 0; b_en = 1; b_we = 0; b_addr = a_addr;
        @(negedge clk); a_en = 0; b_en = 0;
        checks += 2;
        if (a_rdata !== model[a_addr] || b_rdata !== model[a_addr]) begin
          failures++; $display("FAIL collision at %0d", a_addr);
        end
      end
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
