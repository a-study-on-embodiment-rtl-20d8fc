// xover_point_gen: crossover point generator of the operating module.
//
// Combinational. A 16-bit random fraction is compared with the crossover
// probability pc (Q0.16): only when it is smaller are crossover points drawn,
// otherwise the crossover point is 0 (no crossover). Points are integers in
// 1..L-1, made from further 16-bit random fractions r as 1 + (r*(L-1))>>16.
// The op-code chooses one point (simple crossover) or two (two-point). The
// result is given as the bit range [lo, hi) that the crossover operator swaps:
// simple crossover swaps from the point to the end, two-point crossover swaps
// between the two points; lo = hi = 0 means no crossover. The comparison and
// the 1..L-1 range follow the document; the range encoding is this design's.
module xover_point_gen
  import ecans_pkg::*;
#(
  parameter int unsigned L = CHROM_LEN
) (
  input  xover_e                 mode,
  input  logic [15:0]            pc,     // crossover probability, Q0.16
  input  logic [47:0]            rnd,    // [15:0] decision, [31:16] point A, [47:32] point B
  output logic [$clog2(L+1)-1:0] lo,
  output logic [$clog2(L+1)-1:0] hi,
  output logic                   xo_hit   // a crossover takes place
);
  localparam int unsigned PW = $clog2(L+1);

  logic [PW-1:0] pa, pb;

  function automatic logic [PW-1:0] to_point(input logic [15:0] r);
    logic [31:0] prod;
    prod = 32'(r) * 32'(L - 1);
    return PW'(prod >> 16) + PW'(1);
  endfunction

  always_comb begin
    pa    = to_point(rnd[31:16]);
    pb    = to_point(rnd[47:32]);
    lo    = '0;
    hi    = '0;
    xo_hit = 1'b0;
    if (rnd[15:0] < pc) begin
      unique case (mode)
        XO_SIMPLE: begin
          lo = pa;
          hi = PW'(L);
          xo_hit = 1'b1;
        end
        XO_TWO: begin
          lo = (pa < pb) ? pa : pb;
          hi = (pa < pb) ? pb : pa;
          xo_hit = 1'b1;
        end
        default: ;
      endcase
    end
  end
endmodule
