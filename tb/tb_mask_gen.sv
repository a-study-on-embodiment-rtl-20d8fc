// tb_mask_gen: drives a fresh random number each cycle and rebuilds the
// expected mask from the pm rule; checks the L-cycle latency and that
// disabling mutation gives an all-zero mask.
module tb_mask_gen;
  import ecans_pkg::*;
  localparam int L = CHROM_LEN;
  logic clk = 0, rst_n = 0, start = 0, mut_en = 0;
  logic [15:0] pm, rnd;
  logic rnd_en, busy, done;
  logic [L-1:0] mask, exp_mask;
  int checks = 0, failures = 0;

  mask_gen dut (.clk, .rst_n, .start, .mut_en, .pm, .rnd, .rnd_en, .mask, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rnd = 0; pm = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 12; trial++) begin
      int idx, cyc, ones;
      @(negedge clk);
      mut_en = (trial % 4 != 3);
      pm = (trial < 4) ? 16'd6554 : (trial < 8) ? 16'hFFFF : 16'd0;
      start = 1;
      @(negedge clk);
      start = 0;
      idx = 0; cyc = 0; exp_mask = '0;
      while (!done) begin
        rnd = 16'($urandom);
        #1;
        if (rnd_en && busy) begin
          exp_mask[idx] = mut_en && (rnd < pm);
          idx++;
        end
        @(negedge clk);
        cyc++;
        if (cyc > 2 * L) break;
      end
      checks++;
      if (mask !== exp_mask) begin failures++; $display("trial %0d mask mismatch", trial); end
      checks++;
      if (cyc != L) begin failures++; $display("latency %0d", cyc); end
      ones = $countones(mask);
      checks++;
      if (!mut_en && ones != 0) failures++;
      if (trial == 5) begin checks++; if (ones < L - 2) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
