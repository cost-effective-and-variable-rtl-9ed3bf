// temp_mem: temporary memory of a processing unit.
//
// Holds the vector being orthonormalised (z# or w#, up to M words in PU1), and
// in the update step the current weight vector, the n accumulators of
// sum_j z_j*g(w'z_j) and the accumulated sum of g'.  One write port and one
// synchronous read port: the word addressed in cycle t is on rdata in cycle
// t+1.  Depth is a parameter (PU1 needs M words, PU2 only 2*NCH+1); the source
// architecture gives the memory's role, not its size or ports.
module temp_mem
  import fica_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
)(
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  f32_t          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output f32_t          rdata
);
  f32_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
