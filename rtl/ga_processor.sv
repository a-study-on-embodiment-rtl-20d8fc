// ga_processor: the genetic algorithm processor. It holds the genetic
// algorithm controller, the operating module (crossover and mutation) and the
// reproduction module (reproductor and reproduction pool). The two population
// memories and the fitness memory sit outside and are reached through the
// ports below.
//
// A pulse on `gen_start` runs one generation and `gen_done` pulses when it
// is complete. The reproductor first reads the fitness memory and writes one
// instruction per offspring pair into the pool. The controller then executes
// the instructions through port A of the population memories. `cur` names the
// memory that holds the current population. `op`, `pc` and `pm` set the
// op-code and the crossover and mutation probabilities of the generation.
// This structure is the document's; the widths, the fixed selection scheme
// and the timing are this design's.
module ga_processor
  import ecans_pkg::*;
#(
  parameter int unsigned L     = CHROM_LEN,
  parameter int unsigned POP_N = POP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            gen_start,
  output logic            gen_done,
  output logic            busy,
  output logic            cur,
  input  opcode_t         op,
  input  logic [15:0]     pc,
  input  logic [15:0]     pm,
  // population memories, port A
  output logic [1:0]      m_en,
  output logic            m_we,
  output logic [ID_W-1:0] m_addr,
  output logic [L-1:0]    m_wdata,
  input  logic [L-1:0]    m_rdata0,
  input  logic [L-1:0]    m_rdata1,
  // fitness memory, read port
  output logic [ID_W-1:0] f_addr,
  input  logic [15:0]     f_rdata
);
  localparam int unsigned POOL_DEPTH = (POP_N / 2 < 2) ? 2 : POP_N / 2;

  logic    rep_start, rep_done, rep_busy, push, full, empty, pop;
  instr_t  wdata, rdata;
  logic    op_start, op_done, op_busy, crossed;
  opcode_t op_code;
  logic [L-1:0] op_pa, op_pb, op_oa, op_ob;

  reproductor #(.POP_N(POP_N)) u_rep (
    .clk, .rst_n, .start(rep_start), .op, .f_re(), .f_addr, .f_rdata,
    .push, .instr(wdata), .full, .busy(rep_busy), .done(rep_done)
  );

  re_pool #(.DEPTH(POOL_DEPTH)) u_pool (
    .clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count()
  );

  ga_controller #(.L(L)) u_ctl (
    .clk, .rst_n, .gen_start, .gen_done, .busy, .cur,
    .rep_start, .rep_done, .pool_empty(empty), .pool_rdata(rdata), .pool_pop(pop),
    .m_en, .m_we, .m_addr, .m_wdata, .m_rdata0, .m_rdata1,
    .op_start, .op_code, .op_pa, .op_pb, .op_done, .op_oa, .op_ob
  );

  operating_module #(.L(L)) u_opm (
    .clk, .rst_n, .start(op_start), .op(op_code), .pa(op_pa), .pb(op_pb), .pc, .pm,
    .oa(op_oa), .ob(op_ob), .busy(op_busy), .done(op_done), .crossed
  );
endmodule
