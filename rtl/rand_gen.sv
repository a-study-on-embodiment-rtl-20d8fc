// rand_gen: pseudo-random number source for the genetic algorithm processor
// (the random value / random number generator feeding the crossover point
// generator and the mask generators).
//
// A 32-bit xorshift generator (x ^= x<<13; x ^= x>>17; x ^= x<<5). The state
// is set to SEED at reset and advances by one step in every cycle where `en`
// is high; `rnd` is the current state. The document only names the generator;
// the xorshift recurrence and the seeds are this design's choice.
module rand_gen #(
  parameter logic [31:0] SEED = 32'h2545_F491   // must be non-zero
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] rnd
);
  function automatic logic [31:0] step(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rnd <= SEED;
    else if (en) rnd <= step(rnd);
  end
endmodule
