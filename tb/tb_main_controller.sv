// tb_main_controller: the controller with small settings (3 individuals, 2
// generations, 4 samples of 4 neuron steps) in an environment of simple
// models: the rule generator, the GA processor and the fitness evaluator
// answer after fixed delays, the sample memory holds y(i) = 37*i, and the
// output-node count is random. Checks the input vector and target of every
// sample, the prediction (count sum times scale), the number of CA steps,
// fitness writes and GA generations, and best_fit / best_id.
module tb_main_controller;
  import ecans_pkg::*;
  localparam int P = 3, G = 2, WIN = 4, TF = 20, TL = 23, C = COLS, N = NIN;
  localparam int SCALE = (65536 + (C * WIN) / 2) / (C * WIN);
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [15:0] gen;
  logic rg_start, rg_done = 0, ca_step, net_clr, cn_step;
  logic [ID_W-1:0] rg_ind, f_addr, best_id;
  logic [$clog2(C+1)-1:0] out_count;
  logic [9:0] s_addr;
  logic [15:0] s_rdata, fe_d, fe_y, fe_fit, f_wdata, best_fit;
  logic [N*16-1:0] enc_val;
  logic fe_clr, fe_valid, fe_finish, fe_done = 0, f_we, ga_start, ga_done = 0;
  int checks = 0, failures = 0;
  int n_ca = 0, n_ga = 0, n_fw = 0, n_samp = 0, n_done = 0, sum = 0, t_exp = TF;
  int ca_this = 0, last_best = -1, last_id = 0;

  main_controller #(.POP_N(P), .NGEN(G), .WIN(WIN), .T_FIRST(TF), .T_LAST(TL)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) s_rdata <= 16'(37 * int'(s_addr));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // environment models, driven on the falling edge
  always @(negedge clk) begin
    out_count <= 4'($urandom_range(0, C));
    if (rg_start) fork begin repeat (3) @(negedge clk); rg_done <= 1; @(negedge clk); rg_done <= 0; end join_none
    if (ga_start) fork begin repeat (10) @(negedge clk); ga_done <= 1; @(negedge clk); ga_done <= 0; end join_none
    if (fe_finish) fork begin
      @(negedge clk); @(negedge clk);
      fe_fit <= 16'(1000 * int'(rg_ind) + 7 * (int'(gen) + 1) + ((rg_ind == 1) ? 5000 : 0));
      fe_done <= 1; @(negedge clk); fe_done <= 0;
    end join_none
  end

  // checkers, sampled just before the rising edge
  always @(negedge clk) if (rst_n) begin
    #4;
    if (ca_step) begin n_ca++; ca_this++; end
    if (rg_start) ca_this = 0;
    if (net_clr) begin
      checks++; if (ca_this != ROWS - 1) failures++;
      t_exp = TF;
    end
    if (cn_step) begin
      for (int k = 0; k < N; k++) begin
        checks++;
        if (int'(enc_val[k*16 +: 16]) != 37 * (t_exp - 5 * k)) begin failures++; $display("input %0d at t %0d", k, t_exp); end
      end
      sum += int'(out_count);
    end
    if (fe_valid) begin
      int ey;
      ey = sum * SCALE; if (ey > 65535) ey = 65535;
      checks++;
      if (int'(fe_d) != 37 * (t_exp + 1) || int'(fe_y) != ey) begin failures++; $display("sample t %0d: d %0d y %0d exp %0d", t_exp, fe_d, fe_y, ey); end
      sum = 0; t_exp++; n_samp++;
    end
    if (f_we) begin
      n_fw++;
      checks++;
      if (f_wdata != fe_fit || f_addr != rg_ind) failures++;
      if (n_fw > P * G) begin
        if (int'(f_wdata) >= last_best) begin last_best = int'(f_wdata); last_id = int'(f_addr); end
      end
    end
    if (ga_start) n_ga++;
    if (done) n_done++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (n_ca != (G + 1) * P * (ROWS - 1)) begin failures++; $display("ca steps %0d", n_ca); end
    checks++; if (n_ga != G) begin failures++; $display("ga %0d", n_ga); end
    checks++; if (n_fw != (G + 1) * P) begin failures++; $display("fitness writes %0d", n_fw); end
    checks++; if (n_samp != (G + 1) * P * (TL - TF + 1)) begin failures++; $display("samples %0d", n_samp); end
    checks++; if (int'(best_fit) != last_best || int'(best_id) != last_id) begin failures++; $display("best %0d/%0d exp %0d/%0d", best_fit, best_id, last_best, last_id); end
    checks++; if (n_done != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
