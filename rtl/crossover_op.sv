// crossover_op: crossover operator of the operating module, a set of
// multiplexers.
//
// Combinational. Bit i of each offspring comes from the other parent when
// lo <= i < hi and from its own parent otherwise, so [lo, hi) = [p, L) is a
// simple (one-point) crossover, [p1, p2) a two-point crossover, and lo = hi a
// copy. The document names the operator a "multiplex set"; the range interface
// is this design's.
module crossover_op
  import ecans_pkg::*;
#(
  parameter int unsigned L = CHROM_LEN
) (
  input  logic [L-1:0]           pa,
  input  logic [L-1:0]           pb,
  input  logic [$clog2(L+1)-1:0] lo,
  input  logic [$clog2(L+1)-1:0] hi,
  output logic [L-1:0]           ca,
  output logic [L-1:0]           cb
);
  logic [L-1:0] sel;

  always_comb begin
    for (int unsigned i = 0; i < L; i++)
      sel[i] = (i >= 32'(lo)) && (i < 32'(hi));
    ca = (pa & ~sel) | (pb & sel);
    cb = (pb & ~sel) | (pa & sel);
  end
endmodule
