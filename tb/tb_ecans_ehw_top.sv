// tb_ecans_ehw_top: end-to-end run of the evolvable system at reduced size
// (4 individuals, 2 GA generations, 8 neuron steps per sample, samples
// t = 20..40 of a Mackey-Glass series generated here).
//  - The fitness of individual 0 in the first evaluation is recomputed by a
//    reference model here (rule decoding, CA development, pulse encoders,
//    neurons, output count, squared error, 10^(-10E)) and compared.
//  - Every later fitness write is also compared with the model, taking the
//    chromosome from the population memory selected by `cur`.
//  - best_fit must equal the largest fitness in the fitness memory.
//  - A second run switches the op-code to the steady-state model.
//  - Counts, and requires at least one of each: crossover, mutated bit,
//    memory swap, steady-state generation (no swap), CA development step,
//    lateral link, vertical link, neuron pulse, output pulse, full pool.
module tb_ecans_ehw_top;
  import ecans_pkg::*;
  localparam int P = 4, G = 2, WIN = 8, TF = 20, TL = 40;
  localparam int R = ROWS, C = COLS;
  localparam int SCALE = (65536 + (C * WIN) / 2) / (C * WIN);
  logic clk = 0, rst_n = 0;
  logic pop_we = 0, samp_we = 0, start = 0;
  logic [ID_W-1:0] pop_addr, best_id;
  logic [CHROM_LEN-1:0] pop_wdata;
  logic [9:0] samp_addr;
  logic [15:0] samp_wdata, gen, best_fit, mse;
  opcode_t op;
  logic [15:0] pc, pm;
  logic done, busy, cur;
  logic [CHROM_LEN-1:0] init_pop [P];
  int series [1024];
  int checks = 0, failures = 0;
  int n_cross = 0, n_mut = 0, n_swap = 0, n_steady = 0, n_ca = 0, n_lat = 0, n_vert = 0;
  int n_pulse = 0, n_out = 0, n_full = 0;

  ecans_ehw_top #(.POP_N(P), .NGEN(G), .WIN(WIN), .T_FIRST(TF), .T_LAST(TL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // mechanism counters
  always @(negedge clk) if (rst_n) begin
    if (dut.u_gap.u_opm.done) begin
      if (dut.u_gap.u_opm.crossed) n_cross++;
      n_mut += $countones(dut.u_gap.u_opm.mask_a) + $countones(dut.u_gap.u_opm.mask_b);
    end
    if (dut.u_gap.gen_done) begin
      if (dut.u_gap.u_ctl.swap) n_swap++; else n_steady++;
    end
    if (dut.ca_step) n_ca++;
    if (dut.u_gap.u_pool.full) n_full++;
    if (dut.cn_step) begin
      n_pulse += $countones(dut.ys);
      n_out   += int'(dut.out_count);
      for (int i = 0; i < R * C; i++) begin
        if (dut.states[i*STATE_W + 1]) n_lat++;
        if (dut.states[i*STATE_W])     n_vert++;
      end
    end
  end

  // Reference model of one evaluation; returns fitness in [0, 1].
  function automatic real model_fitness(input logic [CHROM_LEN-1:0] ch, output real e_out);
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
    for (int t = TF; t <= TL; t++) begin
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
    sum = real'(sq_sum) / 65536.0 / real'(TL - TF + 1);
    e_out = sum;
    return 10.0 ** (-10.0 * sum);
  endfunction

  // Every fitness write is checked against the model, using the chromosome
  // from the population memory that holds the current generation.
  int n_fit = 0;
  always @(negedge clk) begin
    if (rst_n && dut.f_we) begin
      automatic logic [CHROM_LEN-1:0] ch = dut.cur ? dut.u_pop1.mem[dut.f_addr] : dut.u_pop0.mem[dut.f_addr];
      automatic real em;
      automatic real fm = model_fitness(ch, em);
      automatic real fw = real'(dut.f_wdata) / 65536.0;
      n_fit++;
      checks++;
      if (fw - fm > 0.01 + 0.01 * fm || fm - fw > 0.01 + 0.01 * fm) begin
        failures++;
        $display("fitness write %0d (id %0d, memory %0d): hardware %f model %f", n_fit, dut.f_addr, dut.cur, fw, fm);
      end
    end
  end

  initial begin
    real f0, e0, fh;
    make_series();
    op = '0; op.xover = XO_TWO; op.mut_en = 1; op.steady = 0;
    pc = 16'd39322;  // 0.6
    pm = 16'd1311;   // 0.02
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load series and initial population
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); samp_we = 1; samp_addr = 10'(i); samp_wdata = 16'(series[i]);
    end
    @(negedge clk); samp_we = 0;
    for (int i = 0; i < P; i++) begin
      for (int k = 0; k < CHROM_LEN; k++) init_pop[i][k] = 1'($urandom);
      init_pop[i][RULE_BITS +: INIT_BITS] = {INIT_BITS{1'b1}} ^ INIT_BITS'(i);  // linked top row
      @(negedge clk); pop_we = 1; pop_addr = ID_W'(i); pop_wdata = init_pop[i];
    end
    @(negedge clk); pop_we = 0;

    // run 1: generation model
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // first fitness written is individual 0 of the initial population
    while (!(dut.u_main.f_we)) @(negedge clk);
    f0 = model_fitness(init_pop[0], e0);
    fh = real'(dut.u_main.f_wdata) / 65536.0;
    $display("individual 0: model E %f fit %f, hardware fit %f mse %f", e0, f0, fh, real'(mse) / 65536.0);
    checks++;
    if (fh - f0 > 0.01 + 0.01 * f0 || f0 - fh > 0.01 + 0.01 * f0) failures++;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (int'(gen) != G) failures++;
    begin
      int mx = 0;
      for (int i = 0; i < P; i++) if (int'(dut.u_fitness.mem[i]) > mx) mx = int'(dut.u_fitness.mem[i]);
      checks++;
      if (int'(best_fit) != mx) begin failures++; $display("best %0d max %0d", best_fit, mx); end
      $display("run 1: best fitness %f (individual %0d)", real'(best_fit) / 65536.0, best_id);
    end
    // run 2: steady-state model
    op.steady = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    $display("run 2: best fitness %f", real'(best_fit) / 65536.0);
    $display("crossovers %0d mutated bits %0d swaps %0d steady %0d ca steps %0d lateral %0d vertical %0d pulses %0d out %0d full %0d",
             n_cross, n_mut, n_swap, n_steady, n_ca, n_lat, n_vert, n_pulse, n_out, n_full);
    checks++; if (n_cross == 0) failures++;
    checks++; if (n_mut == 0) failures++;
    checks++; if (n_swap == 0) failures++;
    checks++; if (n_steady == 0) failures++;
    checks++; if (n_ca == 0) failures++;
    checks++; if (n_lat == 0) failures++;
    checks++; if (n_vert == 0) failures++;
    checks++; if (n_pulse == 0) failures++;
    checks++; if (n_out == 0) failures++;
    checks++; if (n_full == 0) failures++;
    checks++; if (n_fit != 2 * P * (G + 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
