// tb_pulse_encoder: for a set of values the number of pulses over n enabled
// cycles must be within one of n*value/65536; also checks clear and no
// pulses while disabled.
module tb_pulse_encoder;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, pulse;
  logic [15:0] value;
  int checks = 0, failures = 0;

  pulse_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      int n, cnt, expv;
      value = (i == 0) ? 16'd0 : (i == 1) ? 16'hFFFF : 16'($urandom);
      n = $urandom_range(16, 1000);
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      cnt = 0; en = 1;
      for (int k = 0; k < n; k++) begin @(negedge clk); cnt += pulse; end
      en = 0;
      @(negedge clk); cnt += pulse;
      expv = int'((longint'(n) * value) / 65536);
      checks++;
      if (cnt < expv || cnt > expv + 1) begin failures++; $display("value %h n %0d count %0d exp %0d", value, n, cnt, expv); end
      repeat (5) begin @(negedge clk); checks++; if (pulse) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
