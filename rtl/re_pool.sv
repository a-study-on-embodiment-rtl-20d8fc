// re_pool: the reproduction pool, the internal instruction memory between the
// reproductor, which writes instructions, and the genetic algorithm
// controller, which executes them in the order they were written.
//
// A synchronous first-in first-out buffer of DEPTH instructions. `push` writes
// `wdata` when not full; `rdata` always shows the oldest entry and `pop`
// removes it when not empty. Push and pop may happen in the same cycle. The
// document gives the pool's role only; the FIFO order and depth are this
// design's choice (DEPTH covers the POP/2 instructions of one generation).
module re_pool
  import ecans_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   push,
  input  instr_t wdata,
  input  logic   pop,
  output instr_t rdata,
  output logic   full,
  output logic   empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  instr_t        mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign full    = (32'(count) == DEPTH);
  assign empty   = (count == '0);
  assign rdata   = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= inc(wp);
      if (do_pop)  rp <= inc(rp);
      count <= count + (do_push ? CW'(1) : CW'(0)) - (do_pop ? CW'(1) : CW'(0));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
