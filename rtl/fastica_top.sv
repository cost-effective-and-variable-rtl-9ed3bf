// fastica_top: cost-effective, variable-channel (2 to 16) floating-point FastICA
// processor for EEG, with re-reference, synchronised average and moving
// average functions.
//
// Structure (as in the source architecture): an instruction-driven controller,
// one data memory holding up to NCH channels of M single-precision samples
// plus the weight matrix, and two processing units.  PU1 and PU2 share the
// centering, the fixed-point update step and the three auxiliary functions,
// working on two channels (or two sample indices) at a time; PU1 alone, which
// also holds the inverse-square-root unit, runs the Gram-Schmidt
// orthonormalisation used both for whitening and for the weight matrix, and
// the convergence test.  No eigenvalue decomposition hardware is needed.
//
// Data memory port A is shared by PU1 and the controller (PU1 has it while it
// is busy), port B belongs to PU2.  A second weight bank (this design's
// choice) holds the new W while the old one is still needed for the update
// and the convergence test; the banks alternate every iteration.
//
// Ports: see fastica_ctrl for the instruction format and the data handshakes.
// All logic is on clk, with an asynchronous active-low reset (the assertions
// also use it to disable themselves during reset).  PU2's converged output is
// left open: PU2 never runs the convergence test.
module fastica_top
  import fica_pkg::*;
#(
  parameter int unsigned NCH = 16,
  parameter int unsigned M   = 512
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instr,
  input  logic        instr_valid,
  output logic        instr_ready,
  output logic        done,
  input  logic [31:0] din,
  input  logic        din_valid,
  output logic        din_ready,
  output logic [31:0] dout,
  output logic        dout_valid,
  input  logic        dout_ready,
  output logic        converged,
  output logic [8:0]  iter_count
);
  localparam int unsigned AW = $clog2(NCH*M + 2*NCH*NCH);

  pu_task_t      p1_tsk, p2_tsk;
  logic          p1_start, p2_start, p1_busy, p2_busy, p1_done, p2_done, p1_conv;
  logic          p1_en, p1_we, p2_en, p2_we, c_en, c_we;
  logic [AW-1:0] p1_addr, p2_addr, c_addr;
  f32_t          p1_wdata, p2_wdata, c_wdata, a_rdata, b_rdata;
  logic          a_en, a_we;
  logic [AW-1:0] a_addr;
  f32_t          a_wdata;

  fastica_ctrl #(.NCH(NCH), .M(M)) u_ctrl (
    .clk, .rst_n,
    .instr(instr_t'(instr)), .instr_valid, .instr_ready, .done,
    .din, .din_valid, .din_ready, .dout, .dout_valid, .dout_ready,
    .converged, .iter_count,
    .p1_start, .p1_tsk, .p1_done, .p1_conv,
    .p2_start, .p2_tsk, .p2_done,
    .c_en, .c_we, .c_addr, .c_wdata, .a_rdata
  );

  pu #(.NCH(NCH), .M(M), .HAS_GS(1'b1)) u_pu1 (
    .clk, .rst_n, .start(p1_start), .tsk(p1_tsk), .busy(p1_busy), .done(p1_done),
    .converged(p1_conv), .mem_en(p1_en), .mem_we(p1_we), .mem_addr(p1_addr),
    .mem_wdata(p1_wdata), .mem_rdata(a_rdata)
  );

  pu #(.NCH(NCH), .M(M), .HAS_GS(1'b0)) u_pu2 (
    .clk, .rst_n, .start(p2_start), .tsk(p2_tsk), .busy(p2_busy), .done(p2_done),
    .converged(), .mem_en(p2_en), .mem_we(p2_we), .mem_addr(p2_addr),
    .mem_wdata(p2_wdata), .mem_rdata(b_rdata)
  );

  always_comb begin
    if (p1_busy) begin a_en = p1_en; a_we = p1_we; a_addr = p1_addr; a_wdata = p1_wdata; end
    else         begin a_en = c_en;  a_we = c_we;  a_addr = c_addr;  a_wdata = c_wdata;  end
  end

  data_mem #(.NCH(NCH), .M(M)) u_mem (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(p2_en), .b_we(p2_we), .b_addr(p2_addr), .b_wdata(p2_wdata), .b_rdata
  );

  // the controller never touches port A while PU1 is working
  assert property (@(posedge clk) disable iff (!rst_n) p1_busy |-> !c_en);
  // a PU is only started when idle
  assert property (@(posedge clk) disable iff (!rst_n) p2_start |-> !p2_busy);
  // PU2 never runs the PU1-only tasks
  assert property (@(posedge clk) disable iff (!rst_n)
    p2_start |-> (p2_tsk.op != T_GS && p2_tsk.op != T_CONV));
endmodule
