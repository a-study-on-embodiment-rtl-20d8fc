// tb_ecans_cell: one non-top cell. For each of the four possible developed
// states (selected through the rule table), the neuron is run on random
// upper, left and right pulses and its output is compared each step with a
// model that applies the connection rules and the neuron equations.
module tb_ecans_cell;
  import ecans_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, load = 0, ca_step = 0, clr = 0, cn_step = 0;
  logic [RULE_AW-1:0] cfg_addr;
  logic [STATE_W-1:0] cfg_data, init_state, up_left, up, up_right, state;
  logic left_link, y_up, y_left, y_right, y;
  int checks = 0, failures = 0;

  ecans_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, c, my;
    repeat (2) @(posedge clk);
    rst_n = 1;
    init_state = 0;
    // rule: new state = upper state
    for (int e = 0; e < RULE_ENTRIES; e++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = RULE_AW'(e); cfg_data = STATE_W'(e >> 2);
    end
    @(negedge clk); cfg_we = 0;
    for (int s = 0; s < 4; s++) begin
      up_left = 2'($urandom); up = 2'(s); up_right = 2'($urandom);
      load = 1; @(negedge clk); load = 0;
      ca_step = 1; @(negedge clk); ca_step = 0;
      checks++;
      if (int'(state) != s) failures++;
      clr = 1; @(negedge clk); clr = 0;
      a = 0; b = 0; c = 0; my = 0;
      for (int t = 0; t < 300; t++) begin
        int iu, il, ir;
        y_up = 1'($urandom); y_left = 1'($urandom); y_right = 1'($urandom); left_link = 1'($urandom);
        cn_step = 1; @(negedge clk); cn_step = 0;
        iu = y_up & s[0]; ir = y_right & s[1]; il = y_left & left_link;
        a = a - (a >>> 2) + (iu ? 256 : 0);
        b = b - (b >>> 2) + (il ? 128 : 0) + (ir ? 128 : 0);
        c = c - (c >>> 2) - (my ? 256 : 0) - 32;
        my = (a + b + c > 0);
        checks++;
        if (int'(y) != my) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
