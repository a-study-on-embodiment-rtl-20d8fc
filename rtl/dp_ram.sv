// dp_ram: dual-port synchronous RAM, used for the two population memories,
// the fitness memory and the time-series sample memory.
//
// Port A reads or writes: when `a_en` is high, a write (`a_we`) stores
// `a_wdata` at `a_addr`, a read returns the word at `a_addr` on `a_rdata` one
// cycle later. Port B only reads, also with one cycle of latency. A read of
// the address being written returns the old word. Contents are not reset. The
// document places these memories outside the processor and gives their role,
// not their organisation; one full word per individual is this design's
// choice.
module dp_ram #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [W-1:0]             a_wdata,
  output logic [W-1:0]             a_rdata,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  output logic [W-1:0]             b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    b_rdata <= mem[b_addr];
  end
endmodule
