// tb_re_pool: random pushes and pops against a queue model; checks order,
// full and empty flags and the count.
module tb_re_pool;
  import ecans_pkg::*;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  instr_t wdata, rdata;
  logic [4:0] count;
  instr_t q[$];
  int checks = 0, failures = 0, n_full = 0;

  re_pool #(.DEPTH(16)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == 16)) begin
        failures++; $display("flags: count %0d model %0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("data mismatch"); end
      end
      if (full) n_full++;
      push  = (i % 400 < 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      push  = push && !full;
      pop   = (i % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      pop   = pop && !empty;
      wdata = instr_t'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
