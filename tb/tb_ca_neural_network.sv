// tb_ca_neural_network: full 5 x 10 network against a reference model kept
// here. A random rule and random initial cells are configured; after each of
// the four CA steps every cell state is compared with the model's
// development. Then the network runs on random input pulses and every
// neuron output and the output-node count are compared each step with a
// model of the neurons and of the connection rules.
module tb_ca_neural_network;
  import ecans_pkg::*;
  localparam int R = ROWS, C = COLS;
  logic clk = 0, rst_n = 0, cfg_we = 0, load = 0, ca_step = 0, clr = 0, cn_step = 0;
  logic [RULE_AW-1:0] cfg_addr;
  logic [STATE_W-1:0] cfg_data;
  logic [C*STATE_W-1:0] init_row;
  logic [NIN-1:0] in_pulse;
  logic [$clog2(C+1)-1:0] out_count;
  logic [R*C*STATE_W-1:0] states;
  logic [R*C-1:0] ys;
  int rule [RULE_ENTRIES];
  int st [R][C];
  int ma [R][C], mb [R][C], mc [R][C], my [R][C];
  int checks = 0, failures = 0, lateral = 0, vertical = 0, fired = 0, outp = 0;

  ca_neural_network dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gs(int r, int c);
    if (c < 0 || c >= C) return 0;
    return st[r][c];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      for (int e = 0; e < RULE_ENTRIES; e++) begin
        @(negedge clk); cfg_we = 1; cfg_addr = RULE_AW'(e); cfg_data = STATE_W'($urandom); rule[e] = int'(cfg_data);
      end
      @(negedge clk); cfg_we = 0;
      for (int c = 0; c < C; c++) begin
        init_row[c*STATE_W +: STATE_W] = STATE_W'($urandom);
        st[0][c] = int'(init_row[c*STATE_W +: STATE_W]);
        for (int r = 1; r < R; r++) st[r][c] = 0;
      end
      load = 1; @(negedge clk); load = 0;
      for (int s = 0; s < R - 1; s++) begin
        int nx [R][C];
        ca_step = 1; @(negedge clk); ca_step = 0;
        nx = st;
        for (int r = 1; r < R; r++) for (int c = 0; c < C; c++)
          nx[r][c] = rule[(gs(r-1, c-1) << 4) | (gs(r-1, c) << 2) | gs(r-1, c+1)];
        st = nx;
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          checks++;
          if (int'(states[(r*C + c)*STATE_W +: STATE_W]) != st[r][c]) begin
            failures++; $display("trial %0d step %0d cell %0d,%0d", trial, s, r, c);
          end
        end
      end
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
        ma[r][c] = 0; mb[r][c] = 0; mc[r][c] = 0; my[r][c] = 0;
        if (st[r][c][1]) lateral++;
        if (st[r][c][0]) vertical++;
      end
      clr = 1; @(negedge clk); clr = 0;
      for (int t = 0; t < 200; t++) begin
        int ny [R][C];
        int cnt;
        in_pulse = NIN'($urandom);
        cn_step = 1; @(negedge clk); cn_step = 0;
        cnt = 0;
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          int up, l, rr, yu, yl, yr;
          yu = (r == 0) ? int'(in_pulse[(c * NIN) / C]) : my[r-1][c];
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
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          checks++;
          if (int'(ys[r*C + c]) != my[r][c]) begin failures++; if (failures < 10) $display("t %0d y %0d,%0d", t, r, c); end
          if (my[r][c]) fired++;
        end
        for (int c = 0; c < C; c++) cnt += my[R-1][c];
        checks++;
        if (int'(out_count) != cnt) failures++;
        outp += cnt;
      end
    end
    checks++;
    if (lateral == 0 || vertical == 0 || fired == 0 || outp == 0) failures++;
    $display("lateral links %0d vertical links %0d pulses %0d output pulses %0d", lateral, vertical, fired, outp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
