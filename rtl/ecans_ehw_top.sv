// ecans_ehw_top: evolvable hardware that evolves a cellular automata neural
// network (ECANS) for one-step time-series prediction.
//
// A genetic algorithm processor evolves the population, whose individuals are
// coded cellular automata rules. For each individual, the rule generator
// writes the rule into the rule tables of the 5 x 10 cell network. The
// network develops its connections from the rule and then runs on
// pulse-coded samples of the time series. The fitness evaluator scores the
// predictions, and the main controller writes the score into the fitness
// memory, where the GA processor reads it to build the next generation.
//
// Memories: population memories 0 and 1 (one CHROM_LEN-bit word per
// individual), the fitness memory (16 bits per individual) and the sample
// memory (1024 x 16-bit Q0.16 series values). Before `start` the host writes
// the initial population into population memory 0 (`pop_we`) and the series
// into the sample memory (`samp_we`). These writes are taken only while the
// system is idle. `op`, `pc` and `pm` select the GA op-code and the crossover
// and mutation probabilities. `done` pulses after the last evaluation;
// `best_fit` and `best_id` name the fittest individual of that evaluation,
// which lies in population memory `cur`.
// The structure follows the document's system diagram. Memory sizes, host
// loading and all timing are this design's own.
module ecans_ehw_top
  import ecans_pkg::*;
#(
  parameter int unsigned POP_N   = POP,
  parameter int unsigned NGEN    = 10,
  parameter int unsigned WIN     = 32,
  parameter int unsigned T_FIRST = 20,
  parameter int unsigned T_LAST  = 498
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host loading
  input  logic                 pop_we,
  input  logic [ID_W-1:0]      pop_addr,
  input  logic [CHROM_LEN-1:0] pop_wdata,
  input  logic                 samp_we,
  input  logic [9:0]           samp_addr,
  input  logic [15:0]          samp_wdata,
  // GA settings
  input  opcode_t              op,
  input  logic [15:0]          pc,
  input  logic [15:0]          pm,
  // run
  input  logic                 start,
  output logic                 done,
  output logic                 busy,
  output logic [15:0]          gen,
  output logic [15:0]          best_fit,
  output logic [ID_W-1:0]      best_id,
  output logic [15:0]          mse,       // mean squared error of the latest individual evaluated
  output logic                 cur
);
  localparam int unsigned PDEPTH = 1 << ID_W;
  localparam int unsigned CW     = $clog2(COLS + 1);

  // ---------------- GA processor and its memories ----------------
  logic                 ga_start, ga_done, ga_busy;
  logic [1:0]           g_en;
  logic                 g_we;
  logic [ID_W-1:0]      g_addr, g_faddr;
  logic [CHROM_LEN-1:0] g_wdata, pa_rdata0, pa_rdata1, pb_rdata0, pb_rdata1;
  logic [15:0]          f_rdata_b, f_rdata_a;

  ga_processor #(.L(CHROM_LEN), .POP_N(POP_N)) u_gap (
    .clk, .rst_n, .gen_start(ga_start), .gen_done(ga_done), .busy(ga_busy), .cur,
    .op, .pc, .pm,
    .m_en(g_en), .m_we(g_we), .m_addr(g_addr), .m_wdata(g_wdata),
    .m_rdata0(pa_rdata0), .m_rdata1(pa_rdata1),
    .f_addr(g_faddr), .f_rdata(f_rdata_b)
  );

  // Host writes reach population memory 0 only while the system is idle.
  logic                 host_ok;
  logic                 m0_en, m0_we;
  logic [ID_W-1:0]      m0_addr;
  logic [CHROM_LEN-1:0] m0_wdata;
  logic [ID_W-1:0]      rg_addr;

  assign host_ok  = !busy && !ga_busy;
  assign m0_en    = g_en[0] || (host_ok && pop_we);
  assign m0_we    = g_en[0] ? g_we    : 1'b1;
  assign m0_addr  = g_en[0] ? g_addr  : pop_addr;
  assign m0_wdata = g_en[0] ? g_wdata : pop_wdata;

  dp_ram #(.W(CHROM_LEN), .DEPTH(PDEPTH)) u_pop0 (
    .clk, .a_en(m0_en), .a_we(m0_we), .a_addr(m0_addr), .a_wdata(m0_wdata), .a_rdata(pa_rdata0),
    .b_addr(rg_addr), .b_rdata(pb_rdata0)
  );
  dp_ram #(.W(CHROM_LEN), .DEPTH(PDEPTH)) u_pop1 (
    .clk, .a_en(g_en[1]), .a_we(g_we), .a_addr(g_addr), .a_wdata(g_wdata), .a_rdata(pa_rdata1),
    .b_addr(rg_addr), .b_rdata(pb_rdata1)
  );

  logic            f_we;
  logic [ID_W-1:0] f_addr;
  logic [15:0]     f_wdata;
  dp_ram #(.W(16), .DEPTH(PDEPTH)) u_fitness (
    .clk, .a_en(f_we), .a_we(f_we), .a_addr(f_addr), .a_wdata(f_wdata), .a_rdata(f_rdata_a),
    .b_addr(g_faddr), .b_rdata(f_rdata_b)
  );

  // ---------------- time series ----------------
  logic [9:0]  s_addr;
  logic [15:0] s_rdata, s_rdata_a;
  dp_ram #(.W(16), .DEPTH(1024)) u_samples (
    .clk, .a_en(samp_we && host_ok), .a_we(1'b1), .a_addr(samp_addr), .a_wdata(samp_wdata),
    .a_rdata(s_rdata_a), .b_addr(s_addr), .b_rdata(s_rdata)
  );

  // ---------------- rule generator and network ----------------
  logic                 rg_start, rg_done;
  logic [ID_W-1:0]      rg_ind;
  logic                 cfg_we, load;
  logic [RULE_AW-1:0]   cfg_addr;
  logic [STATE_W-1:0]   cfg_data;
  logic [INIT_BITS-1:0] init_row;

  rule_generator u_rg (
    .clk, .rst_n, .start(rg_start), .ind(rg_ind), .done(rg_done),
    .m_addr(rg_addr), .m_rdata(cur ? pb_rdata1 : pb_rdata0),
    .cfg_we, .cfg_addr, .cfg_data, .load, .init_row
  );

  logic                          ca_step, net_clr, cn_step;
  logic [NIN-1:0]                in_pulse;
  logic [CW-1:0]                 out_count;
  logic [ROWS*COLS*STATE_W-1:0]  states;
  logic [ROWS*COLS-1:0]          ys;

  ca_neural_network #(.R(ROWS), .C(COLS), .N(NIN)) u_net (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .load, .init_row, .ca_step,
    .clr(net_clr), .cn_step, .in_pulse, .out_count, .states, .ys
  );

  logic [NIN*16-1:0] enc_val;
  for (genvar k = 0; k < NIN; k++) begin : g_enc
    pulse_encoder u_enc (
      .clk, .rst_n, .clr(net_clr), .en(cn_step), .value(enc_val[k*16 +: 16]), .pulse(in_pulse[k])
    );
  end

  // ---------------- fitness evaluation ----------------
  logic        fe_clr, fe_valid, fe_finish, fe_done;
  logic [15:0] fe_d, fe_y, fe_fit;

  fitness_eval #(.NSAMP(T_LAST - T_FIRST + 1)) u_fe (
    .clk, .rst_n, .clr(fe_clr), .sample_valid(fe_valid), .d(fe_d), .y(fe_y),
    .finish(fe_finish), .done(fe_done), .fit(fe_fit), .mse
  );

  // ---------------- main controller ----------------
  main_controller #(
    .POP_N(POP_N), .NGEN(NGEN), .R(ROWS), .C(COLS), .N(NIN), .DELAY(5), .WIN(WIN),
    .T_FIRST(T_FIRST), .T_LAST(T_LAST), .SAW(10)
  ) u_main (
    .clk, .rst_n, .start, .done, .busy, .gen,
    .rg_start, .rg_ind, .rg_done,
    .ca_step, .net_clr, .cn_step, .out_count,
    .s_addr, .s_rdata, .enc_val,
    .fe_clr, .fe_valid, .fe_d, .fe_y, .fe_finish, .fe_done, .fe_fit,
    .f_we, .f_addr, .f_wdata,
    .ga_start, .ga_done, .best_fit, .best_id
  );
endmodule
