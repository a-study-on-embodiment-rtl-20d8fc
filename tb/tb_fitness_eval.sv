// tb_fitness_eval: random desired/predicted sequences, including errors large
// enough to drive the fitness close to zero. E and 10^(-10E) are computed here in
// floating point from the same rounded-down squared errors and compared
// with the hardware result (tolerance 0.5% of full scale plus 0.3%).
// Also checks the two-cycle latency of `finish` to `done`.
module tb_fitness_eval;
  localparam int N = 50;
  logic clk = 0, rst_n = 0, clr = 0, sample_valid = 0, finish = 0, done;
  logic [15:0] d, y, fit, mse;
  int checks = 0, failures = 0;

  fitness_eval #(.NSAMP(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 30; trial++) begin
      real sum, e, f, fh;
      int spread, cyc;
      spread = (trial < 10) ? 500 : (trial < 20) ? 5000 : 30000;
      @(negedge clk); clr = 1; @(negedge clk); clr = 0;
      sum = 0;
      for (int i = 0; i < N; i++) begin
        int dd, yy, df;
        dd = $urandom_range(20000, 45000);
        yy = dd + $urandom_range(0, 2 * spread) - spread;
        if (yy < 0) yy = 0;
        if (yy > 65535) yy = 65535;
        d = 16'(dd); y = 16'(yy);
        df = dd - yy;
        sum += real'((longint'(df) * df) >> 16) / 65536.0;
        sample_valid = 1; @(negedge clk); sample_valid = 0;
      end
      finish = 1; @(negedge clk); finish = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      e = sum / N;
      f = 10.0 ** (-10.0 * e);
      fh = real'(fit) / 65536.0;
      checks++;
      if (cyc != 2) failures++;
      checks++;
      if (fh - f > 0.005 + 0.003 * f || f - fh > 0.005 + 0.003 * f) begin
        failures++; $display("E %f fit %f hw %f", e, f, fh);
      end
      checks++;
      if ((real'(mse) / 65536.0) - e > 0.0001 || e - (real'(mse) / 65536.0) > 0.0001) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
