// tb_ecans_predict: the prediction experiment with separate training and
// test halves of a 1000-point Mackey-Glass series (delay 30, generated
// here). Two copies of the top share the clock:
//  - u_train has every parameter at its default and evolves 20 individuals
//    for 10 generations on samples t = 20..498 (the first half);
//  - u_test is the same top with NGEN = 0 (evaluate only) and samples
//    t = 500..998 (the second half, targets up to y(999)).
// After training, the final population (the memory selected by `cur`) is
// copied into u_test through its host port and evaluated once. Every test
// fitness write is compared with a reference model (rule decoding, CA
// development, sigma-delta encoders, neurons, output count, error,
// 10^(-10E)), best_fit of the test run must be the largest fitness written,
// and the training and test fitness of the best trained network are printed.
// Splitting the series into halves follows the original study; the test
// start t = 500 is this design's choice (its delayed inputs reach back into
// the first half).
module tb_ecans_predict;
  import ecans_pkg::*;
  localparam int P = POP, WIN = 32, TRF = 20, TRL = 498, TSF = 500, TSL = 998;
  localparam int R = ROWS, C = COLS;
  localparam int SCALE = (65536 + (C * WIN) / 2) / (C * WIN);
  logic clk = 0, rst_n = 0;
  opcode_t op;
  logic [15:0] pc, pm;
  // training copy
  logic a_pop_we = 0, a_samp_we = 0, a_start = 0, a_done, a_busy, a_cur;
  logic [ID_W-1:0] a_pop_addr = '0, a_best_id;
  logic [CHROM_LEN-1:0] a_pop_wdata = '0;
  logic [9:0] a_samp_addr = '0;
  logic [15:0] a_samp_wdata = '0, a_gen, a_best_fit, a_mse;
  // test copy
  logic b_pop_we = 0, b_samp_we = 0, b_start = 0, b_done, b_busy, b_cur;
  logic [ID_W-1:0] b_pop_addr = '0, b_best_id;
  logic [CHROM_LEN-1:0] b_pop_wdata = '0;
  logic [9:0] b_samp_addr = '0;
  logic [15:0] b_samp_wdata = '0, b_gen, b_best_fit, b_mse;
  logic [CHROM_LEN-1:0] final_pop [P];
  int series [1024];
  int checks = 0, failures = 0, n_test = 0;

  ecans_ehw_top u_train (
    .clk, .rst_n, .pop_we(a_pop_we), .pop_addr(a_pop_addr), .pop_wdata(a_pop_wdata),
    .samp_we(a_samp_we), .samp_addr(a_samp_addr), .samp_wdata(a_samp_wdata),
    .op, .pc, .pm, .start(a_start), .done(a_done), .busy(a_busy), .gen(a_gen),
    .best_fit(a_best_fit), .best_id(a_best_id), .mse(a_mse), .cur(a_cur)
  );

  ecans_ehw_top #(.NGEN(0), .T_FIRST(TSF), .T_LAST(TSL)) u_test (
    .clk, .rst_n, .pop_we(b_pop_we), .pop_addr(b_pop_addr), .pop_wdata(b_pop_wdata),
    .samp_we(b_samp_we), .samp_addr(b_samp_addr), .samp_wdata(b_samp_wdata),
    .op, .pc, .pm, .start(b_start), .done(b_done), .busy(b_busy), .gen(b_gen),
    .best_fit(b_best_fit), .best_id(b_best_id), .mse(b_mse), .cur(b_cur)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mackey-Glass, a = 0.2, b = 0.1, c = 10, delay 30; Euler steps of 0.1,
  // one sample per time unit, scaled by 1/1.5 into Q0.16.
  task automatic make_series();
    real h [0:299], x, xd;
    int  p;
    for (int i = 0; i < 300; i++) h[i] = 1.2;
    x = 1.2; p = 0;
    for (int n = 0; n < 1024 * 10 + 2000; n++) begin
      xd = h[p];
      h[p] = x;
      p = (p + 1) % 300;
      x = x + 0.1 * (0.2 * xd / (1.0 + xd ** 10) - 0.1 * x);
      if (n >= 2000 && (n - 2000) % 10 == 0) series[(n - 2000) / 10] = int'(x / 1.5 * 65536.0);
    end
  endtask

  // Reference model of one evaluation over samples tf..tl; returns fitness.
  function automatic real model_fitness(input logic [CHROM_LEN-1:0] ch, input int tf, input int tl,
                                       output real e_out);
    int st [R][C], ma [R][C], mb [R][C], mc [R][C], my [R][C];
    int acc [NIN], pls [NIN];
    real sum;
    longint sq_sum;
    for (int c = 0; c < C; c++) begin
      st[0][c] = int'(ch[RULE_BITS + c*STATE_W +: STATE_W]);
      for (int r = 1; r < R; r++) st[r][c] = 0;
    end
    for (int s = 0; s < R - 1; s++) begin
      int nx [R][C];
      nx = st;
      for (int r = 1; r < R; r++) for (int c = 0; c < C; c++) begin
        int ul, u, ur;
        ul = (c > 0) ? st[r-1][c-1] : 0;
        u  = st[r-1][c];
        ur = (c < C - 1) ? st[r-1][c+1] : 0;
        nx[r][c] = int'(ch[((ul << 4) | (u << 2) | ur) * STATE_W +: STATE_W]);
      end
      st = nx;
    end
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      ma[r][c] = 0; mb[r][c] = 0; mc[r][c] = 0; my[r][c] = 0;
    end
    for (int k = 0; k < NIN; k++) acc[k] = 0;
    sq_sum = 0;
    for (int t = tf; t <= tl; t++) begin
      int cnt, yh, df;
      cnt = 0;
      for (int k = 0; k < NIN; k++) pls[k] = 0;
      for (int w = 0; w < WIN; w++) begin
        int ny [R][C];
        for (int c = 0; c < C; c++) cnt += my[R-1][c];
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          int yu, yl, yr, up, l, rr;
          yu = (r == 0) ? pls[(c * NIN) / C] : my[r-1][c];
          yl = (c > 0) ? my[r][c-1] : 0;
          yr = (c < C - 1) ? my[r][c+1] : 0;
          up = yu & st[r][c][0];
          rr = yr & st[r][c][1];
          l  = (c > 0) ? (yl & st[r][c-1][1]) : 0;
          ma[r][c] = ma[r][c] - (ma[r][c] >>> 2) + (up ? 256 : 0);
          mb[r][c] = mb[r][c] - (mb[r][c] >>> 2) + (l ? 128 : 0) + (rr ? 128 : 0);
          mc[r][c] = mc[r][c] - (mc[r][c] >>> 2) - (my[r][c] ? 256 : 0) - 32;
          ny[r][c] = (ma[r][c] + mb[r][c] + mc[r][c] > 0);
        end
        my = ny;
        for (int k = 0; k < NIN; k++) begin
          acc[k] += series[t - 5 * k];
          pls[k] = (acc[k] >= 65536);
          acc[k] = acc[k] % 65536;
        end
      end
      yh = cnt * SCALE; if (yh > 65535) yh = 65535;
      df = series[t + 1] - yh;
      sq_sum += (longint'(df) * df) >> 16;
    end
    sum = real'(sq_sum) / 65536.0 / real'(tl - tf + 1);
    e_out = sum;
    return 10.0 ** (-10.0 * sum);
  endfunction

  // every fitness written by the test copy is checked against the model
  always @(negedge clk) begin
    if (rst_n && u_test.f_we) begin
      automatic real em;
      automatic real fm = model_fitness(final_pop[u_test.f_addr], TSF, TSL, em);
      automatic real fw = real'(u_test.f_wdata) / 65536.0;
      n_test++;
      checks++;
      if (fw - fm > 0.01 + 0.01 * fm || fm - fw > 0.01 + 0.01 * fm) begin
        failures++;
        $display("test fitness of individual %0d: hardware %f model %f", u_test.f_addr, fw, fm);
      end
    end
  end

  initial begin
    make_series();
    op = '0; op.xover = XO_TWO; op.mut_en = 1; op.steady = 0;
    pc = 16'd39322;  // 0.6
    pm = 16'd1311;   // 0.02
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      a_samp_we = 1; a_samp_addr = 10'(i); a_samp_wdata = 16'(series[i]);
      b_samp_we = 1; b_samp_addr = 10'(i); b_samp_wdata = 16'(series[i]);
    end
    @(negedge clk); a_samp_we = 0; b_samp_we = 0;
    for (int i = 0; i < P; i++) begin
      logic [CHROM_LEN-1:0] ch;
      for (int k = 0; k < CHROM_LEN; k++) ch[k] = 1'($urandom);
      ch[RULE_BITS +: INIT_BITS] = {INIT_BITS{1'b1}} ^ INIT_BITS'(i);  // linked top row
      @(negedge clk); a_pop_we = 1; a_pop_addr = ID_W'(i); a_pop_wdata = ch;
    end
    @(negedge clk); a_pop_we = 0;

    // training on the first half
    @(negedge clk); a_start = 1; @(negedge clk); a_start = 0;
    while (!a_done) @(negedge clk);
    @(negedge clk);
    checks++; if (int'(a_gen) != 10) failures++;
    $display("training: best fitness %f, E %f, individual %0d", real'(a_best_fit) / 65536.0,
             -$log10(real'(a_best_fit) / 65536.0) / 10.0, a_best_id);

    // copy the final population into the test copy and evaluate it once
    for (int i = 0; i < P; i++)
      final_pop[i] = a_cur ? u_train.u_pop1.mem[i] : u_train.u_pop0.mem[i];
    for (int i = 0; i < P; i++) begin
      @(negedge clk); b_pop_we = 1; b_pop_addr = ID_W'(i); b_pop_wdata = final_pop[i];
    end
    @(negedge clk); b_pop_we = 0;
    @(negedge clk); b_start = 1; @(negedge clk); b_start = 0;
    while (!b_done) @(negedge clk);
    @(negedge clk);
    checks++; if (n_test != P) failures++;
    begin
      int mx = 0;
      real em, fm;
      for (int i = 0; i < P; i++) if (int'(u_test.u_fitness.mem[i]) > mx) mx = int'(u_test.u_fitness.mem[i]);
      checks++;
      if (int'(b_best_fit) != mx) failures++;
      fm = model_fitness(final_pop[a_best_id], TSF, TSL, em);
      $display("test: best trained network fitness %f (model %f, E %f); best on test %f (individual %0d)",
               real'(u_test.u_fitness.mem[a_best_id]) / 65536.0, fm, em, real'(b_best_fit) / 65536.0, b_best_id);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
