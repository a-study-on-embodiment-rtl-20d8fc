// tb_rand_gen: checks the xorshift sequence of rand_gen against a reference
// written here, and that the state holds while the enable is low.
module tb_rand_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] rnd, model;
  int checks = 0, failures = 0;

  rand_gen #(.SEED(32'h1234_5678)) dut (.clk, .rst_n, .en, .rnd);

  always #5 clk = ~clk;

  function automatic logic [31:0] nxt(input logic [31:0] x);
    x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
    return x;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 32'h1234_5678;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (rnd !== model) failures++;
    for (int i = 0; i < 300; i++) begin
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) model = nxt(model);
      checks++;
      if (rnd !== model) begin failures++; $display("mismatch %h %h", rnd, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
