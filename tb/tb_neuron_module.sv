// tb_neuron_module: random input pulses and clock enables; the three terms
// and the output pulse are recomputed here from the model equations
// (k = 0.75, v = 1, w = 0.5, alpha = 1, theta = 0.5 in Q8.8) and compared
// every cycle. Also checks that the neuron both fires and rests.
module tb_neuron_module;
  logic clk = 0, rst_n = 0, clr = 0, cn_step = 0, in_up = 0, in_left = 0, in_right = 0, y;
  logic signed [15:0] x;
  int checks = 0, failures = 0, fires = 0, rests = 0;
  int a, b, c, my;

  neuron_module dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = 0; b = 0; c = 0; my = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr      = (i == 1000);
      cn_step  = ($urandom_range(0, 4) != 0);
      in_up    = (i % 300 < 150) ? ($urandom_range(0, 1) == 1) : 1'b0;
      in_left  = ($urandom_range(0, 3) == 0);
      in_right = ($urandom_range(0, 3) == 0);
      if (clr) begin a = 0; b = 0; c = 0; my = 0; end
      else if (cn_step) begin
        a = a - (a >>> 2) + (in_up ? 256 : 0);
        b = b - (b >>> 2) + (in_left ? 128 : 0) + (in_right ? 128 : 0);
        c = c - (c >>> 2) - (my ? 256 : 0) - (128 >>> 2);
        my = (a + b + c > 0);
      end
      @(negedge clk);
      cn_step = 0; clr = 0;
      checks++;
      if (int'(y) != my || int'(x) != a + b + c && !(clr)) begin
        failures++;
        if (failures < 5) $display("cycle %0d: y %0d x %0d, model %0d %0d abc %0d %0d %0d model %0d %0d %0d", i, y, x, my, a + b + c, dut.a, dut.b, dut.c, a, b, c);
      end
      if (y) fires++; else rests++;
    end
    checks++;
    if (fires == 0 || rests == 0) failures++;
    $display("fires %0d rests %0d", fires, rests);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
