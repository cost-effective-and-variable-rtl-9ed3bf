// data_mem: the processor's data memory.
//
// In the source design this is a compiled SRAM macro; here it is an array with
// two independent synchronous ports, so that PU1 (or the controller) and PU2 can
// each read or write one word per cycle.  A read issued in cycle t returns the
// word in cycle t+1; a write and a read on the same port in the same cycle are
// not used.  When both ports write the same address, port A wins.
//
// Address map (word addresses), NCH = 16, M = 512:
//   ch*M + j                  signal sample j of channel ch (x, then z)
//   NCH*M + s*NCH*NCH + i*NCH + c   component c of weight vector w_i in weight
//                              bank s (two banks, old and new W)
// The sizes follow the source (16 channels, 512 samples); the two weight banks
// and the two-port organisation are this design's choice.
module data_mem
  import fica_pkg::*;
#(
  parameter int unsigned NCH   = 16,
  parameter int unsigned M     = 512,
  parameter int unsigned DEPTH = NCH*M + 2*NCH*NCH,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  f32_t          a_wdata,
  output f32_t          a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  f32_t          b_wdata,
  output f32_t          b_rdata
);
  f32_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (b_en && b_we && !(a_en && a_we && a_addr == b_addr)) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end
endmodule
