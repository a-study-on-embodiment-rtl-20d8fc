// tb_lut_block: writes random configurations and checks that every input
// pattern reads back the configured entry; then rewrites part of the table
// and checks that only those entries changed.
module tb_lut_block;
  logic clk = 0, cfg_we = 0;
  logic [5:0] cfg_addr, in;
  logic [1:0] cfg_data, out;
  logic [1:0] model [64];
  int checks = 0, failures = 0;

  lut_block #(.N(6), .W(2)) dut (.clk, .cfg_we, .cfg_addr, .cfg_data, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int e = 0; e < 64; e++) begin
        if (round == 0 || $urandom_range(0, 3) == 0) begin
          @(negedge clk);
          cfg_we = 1; cfg_addr = 6'(e); cfg_data = 2'($urandom); model[e] = cfg_data;
        end
      end
      @(negedge clk); cfg_we = 0;
      for (int e = 0; e < 64; e++) begin
        in = 6'(e); #1;
        checks++;
        if (out !== model[e]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
