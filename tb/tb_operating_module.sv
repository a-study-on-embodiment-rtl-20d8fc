// tb_operating_module: crossover and mutation of random parents.
//  - pc = 0, no mutation: offspring equal parents, latency L+2 cycles.
//  - pc = max, simple or two-point crossover, no mutation: the swapped bits
//    form one range [lo, hi) (hi = L for simple crossover), recovered
//    from the offspring and checked bit by bit.
//  - pc = 0, pm = max: offspring are the complements of the parents.
module tb_operating_module;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN;
  logic clk = 0, rst_n = 0, start = 0;
  opcode_t op;
  logic [L-1:0] pa, pb, oa, ob;
  logic [15:0] pc, pm;
  logic busy, done, crossed;
  int checks = 0, failures = 0, n_cross = 0, n_mut = 0;

  operating_module dut (.clk, .rst_n, .start, .op, .pa, .pb, .pc, .pm, .oa, .ob, .busy, .done, .crossed);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(output int cycles);
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      int kind;
      kind = trial % 4;
      for (int k = 0; k < L; k++) begin pa[k] = 1'($urandom); pb[k] = 1'($urandom); end
      op = '0;
      case (kind)
        0: begin op.xover = XO_TWO;    op.mut_en = 0; pc = 0;      pm = 16'hFFFF; end
        1: begin op.xover = XO_SIMPLE; op.mut_en = 0; pc = 16'hFFFF; pm = 16'hFFFF; end
        2: begin op.xover = XO_TWO;    op.mut_en = 0; pc = 16'hFFFF; pm = 0; end
        default: begin op.xover = XO_NONE; op.mut_en = 1; pc = 16'hFFFF; pm = 16'hFFFF; end
      endcase
      run(cyc);
      checks++;
      if (cyc != L + 2) begin failures++; $display("latency %0d", cyc); end
      if (kind == 0) begin
        checks++;
        if (oa !== pa || ob !== pb) failures++;
      end else if (kind == 3) begin
        int bad;
        bad = $countones((oa ^ ~pa)) + $countones((ob ^ ~pb));
        checks++;
        if (bad > 3) begin failures++; $display("mutation: %0d unflipped bits", bad); end
        n_mut++;
      end else begin
        // recover swap set: bits where offspring came from the other parent
        int lo, hi, bad;
        logic [L-1:0] diff;
        diff = pa ^ pb;
        lo = -1; hi = -1; bad = 0;
        for (int k = 0; k < L; k++) begin
          if (diff[k] && oa[k] == pb[k]) begin
            if (lo < 0) lo = k;
            hi = k + 1;
          end
        end
        if (lo >= 0) begin
          for (int k = 0; k < L; k++) begin
            logic sw;
            sw = (k >= lo && k < hi);
            if (diff[k] && ((sw ? pb[k] : pa[k]) != oa[k] || (sw ? pa[k] : pb[k]) != ob[k])) bad++;
            if (!diff[k] && (oa[k] != pa[k] || ob[k] != pb[k])) bad++;
          end
          if (kind == 1) begin
            // simple crossover: swapped through the last differing bit
            for (int k = hi; k < L; k++) if (diff[k]) bad++;
          end
          n_cross++;
        end
        checks++;
        if (bad != 0 || crossed !== 1'b1) begin failures++; $display("crossover kind %0d: %0d bad", kind, bad); end
      end
    end
    checks++;
    if (n_cross == 0 || n_mut == 0) failures++;
    $display("crossovers %0d mutations %0d", n_cross, n_mut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
