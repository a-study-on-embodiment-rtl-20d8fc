// tb_ga_controller: the testbench plays reproductor (it fills a pool model
// with instructions on `rep_start`), both population memories and an
// operating module whose result is easy to predict (oa = ~pa, ob = pa ^ pb).
// After each generation it checks every written individual, that the memories
// swap roles in the generation model and stay in the steady-state model.
module tb_ga_controller;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN, P = 8;
  logic clk = 0, rst_n = 0, gen_start = 0, gen_done, busy, cur;
  logic rep_start, rep_done = 0, pool_empty, pool_pop;
  instr_t pool_rdata, q[$], issued[$];
  logic [1:0] m_en;
  logic m_we;
  logic [ID_W-1:0] m_addr;
  logic [L-1:0] m_wdata, m_rdata0, m_rdata1;
  logic op_start, op_done = 0;
  opcode_t op_code;
  logic [L-1:0] op_pa, op_pb, op_oa, op_ob;
  logic [L-1:0] mem [2][32], ref_mem [2][32];
  int checks = 0, failures = 0, n_swap = 0, n_steady = 0;

  ga_controller dut (.*);

  always #5 clk = ~clk;

  int rp = 0;
  assign pool_empty = (rp >= q.size());
  assign pool_rdata = pool_empty ? '0 : q[rp];
  always_ff @(posedge clk) if (pool_pop && !pool_empty) rp <= rp + 1;

  always_ff @(posedge clk) begin
    for (int m = 0; m < 2; m++) if (m_en[m]) begin
      if (m_we) mem[m][m_addr] <= m_wdata;
    end
    m_rdata0 <= mem[0][m_addr];
    m_rdata1 <= mem[1][m_addr];
  end

  // operating-module stand-in: result after 5 cycles
  initial begin
    forever begin
      @(negedge clk);
      if (op_start) begin
        logic [L-1:0] a, b;
        a = op_pa; b = op_pb;
        repeat (4) @(posedge clk);
        op_oa <= ~a; op_ob <= a ^ b; op_done <= 1;
        @(posedge clk); op_done <= 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) for (int i = 0; i < 32; i++)
      for (int k = 0; k < L; k++) mem[m][i][k] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 4; g++) begin
      logic steady, c0;
      steady = (g == 2);
      c0 = cur;
      ref_mem = mem;
      @(negedge clk); gen_start = 1; @(negedge clk); gen_start = 0;
      // play reproductor
      while (!rep_start && !busy) @(negedge clk);
      repeat (3) @(negedge clk);
      issued.delete();
      for (int k = 0; k < P / 2; k++) begin
        instr_t ins;
        ins.op = '0; ins.op.steady = steady;
        ins.p1 = ID_W'($urandom_range(0, P - 1));
        ins.p2 = ID_W'($urandom_range(0, P - 1));
        ins.d1 = steady ? ID_W'($urandom_range(0, P - 1)) : ID_W'(2 * k);
        ins.d2 = steady ? ID_W'((ins.d1 + 1) % P) : ID_W'(2 * k + 1);
        q.push_back(ins); issued.push_back(ins);
      end
      rep_done = 1; @(negedge clk); rep_done = 0;
      while (!gen_done) @(negedge clk);
      @(negedge clk);
      // model: apply instructions in order
      begin
        int s, d;
        s = c0; d = steady ? c0 : !c0;
        foreach (issued[i]) begin
          logic [L-1:0] a, b;
          a = ref_mem[s][issued[i].p1]; b = ref_mem[s][issued[i].p2];
          ref_mem[d][issued[i].d1] = ~a;
          ref_mem[d][issued[i].d2] = a ^ b;
        end
      end
      for (int m = 0; m < 2; m++) for (int i = 0; i < P; i++) begin
        checks++;
        if (mem[m][i] !== ref_mem[m][i]) begin failures++; $display("gen %0d mem %0d[%0d] differs", g, m, i); end
      end
      checks++;
      if (cur !== (steady ? c0 : !c0)) begin failures++; $display("cur wrong"); end
      if (steady) n_steady++; else n_swap++;
    end
    checks++;
    if (n_steady == 0 || n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
