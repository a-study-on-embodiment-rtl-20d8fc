// tb_ga_processor: one GA processor with population and fitness memory
// models. Three generations:
//  1. generation model, no crossover, no mutation: the other memory is filled
//     completely with copies of current individuals and the memories swap;
//  2. generation model, mutation probability max: every new individual is the
//     complement of a current one;
//  3. steady-state model with two-point crossover: the memories do not swap,
//     the other memory is untouched, and each pair of new bits comes from
//     the old population.
module tb_ga_processor;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN, P = 20;
  logic clk = 0, rst_n = 0, gen_start = 0, gen_done, busy, cur;
  opcode_t op;
  logic [15:0] pc, pm;
  logic [1:0] m_en;
  logic m_we;
  logic [ID_W-1:0] m_addr, f_addr;
  logic [L-1:0] m_wdata, m_rdata0, m_rdata1;
  logic [15:0] f_rdata, fit [32];
  logic [L-1:0] mem [2][32], old [2][32];
  int checks = 0, failures = 0, cycles;

  ga_processor #(.POP_N(P)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    for (int m = 0; m < 2; m++) if (m_en[m] && m_we) mem[m][m_addr] <= m_wdata;
    m_rdata0 <= mem[0][m_addr];
    m_rdata1 <= mem[1][m_addr];
    f_rdata  <= fit[f_addr];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int best_match(input logic [L-1:0] v, input int m, input bit inv);
    int best = L + 1;
    for (int i = 0; i < P; i++) begin
      int d = $countones(v ^ (inv ? ~old[m][i] : old[m][i]));
      if (d < best) best = d;
    end
    return best;
  endfunction

  task automatic run_gen();
    old = mem;
    @(negedge clk); gen_start = 1; @(negedge clk); gen_start = 0;
    cycles = 1;
    while (!gen_done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      fit[i] = 16'($urandom);
      for (int k = 0; k < L; k++) begin mem[0][i][k] = 1'($urandom); mem[1][i][k] = 1'b0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1: copies
    op = '0; op.xover = XO_TWO; pc = 0; pm = 0;
    run_gen();
    checks++; if (cur !== 1'b1) failures++;
    for (int i = 0; i < P; i++) begin
      checks++;
      if (best_match(mem[1][i], 0, 0) != 0) begin failures++; $display("gen1 %0d not a copy", i); end
    end
    $display("generation of %0d individuals took %0d cycles", P, cycles);
    // 2: full mutation
    op = '0; op.mut_en = 1; pc = 0; pm = 16'hFFFF;
    run_gen();
    checks++; if (cur !== 1'b0) failures++;
    for (int i = 0; i < P; i++) begin
      checks++;
      if (best_match(mem[0][i], 1, 1) > 3) begin failures++; $display("gen2 %0d not a complement", i); end
    end
    // 3: steady state with crossover
    op = '0; op.xover = XO_TWO; op.steady = 1; pc = 16'hFFFF; pm = 0;
    run_gen();
    checks++; if (cur !== 1'b0) failures++;
    for (int i = 0; i < P; i++) begin
      checks++;
      if (mem[1][i] !== old[1][i]) failures++;
    end
    begin
      int changed = 0;
      for (int i = 0; i < P; i++) if (mem[0][i] !== old[0][i]) changed++;
      checks++;
      if (changed == 0) begin failures++; $display("steady state changed nothing"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
