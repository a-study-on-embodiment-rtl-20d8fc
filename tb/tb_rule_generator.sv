// tb_rule_generator: a population-memory model holds random individuals; for
// several individuals the testbench records every rule-table write and the
// initial row, and checks them against the coding (entry e = bits
// [2e+1:2e], initial cells above the rule), plus the RULE_ENTRIES+4 cycle
// latency.
module tb_rule_generator;
  import ecans_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, cfg_we, load;
  logic [ID_W-1:0] ind, m_addr;
  logic [CHROM_LEN-1:0] m_rdata, mem [32];
  logic [RULE_AW-1:0] cfg_addr;
  logic [STATE_W-1:0] cfg_data;
  logic [INIT_BITS-1:0] init_row;
  int checks = 0, failures = 0;

  rule_generator dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) m_rdata <= mem[m_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) for (int k = 0; k < CHROM_LEN; k++) mem[i][k] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 8; trial++) begin
      int cyc, nw, nl;
      logic [STATE_W-1:0] got [RULE_ENTRIES];
      ind = ID_W'($urandom_range(0, 31));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1; nw = 0; nl = 0;
      while (!done) begin
        if (cfg_we) begin got[cfg_addr] = cfg_data; nw++; end
        if (load) begin
          nl++;
          checks++;
          if (init_row !== mem[ind][RULE_BITS +: INIT_BITS]) failures++;
        end
        @(negedge clk); cyc++;
      end
      checks++;
      if (nw != RULE_ENTRIES || nl != 1 || cyc != RULE_ENTRIES + 4) begin
        failures++; $display("writes %0d loads %0d cycles %0d", nw, nl, cyc);
      end
      for (int e = 0; e < RULE_ENTRIES; e++) begin
        checks++;
        if (got[e] !== mem[ind][e*STATE_W +: STATE_W]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
