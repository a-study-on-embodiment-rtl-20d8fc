// tb_ca_module: configures a random rule table, then checks load, the update
// on the CA clock enable for random neighbourhoods, holding without the
// enable, and that a top-row cell keeps its initial state.
module tb_ca_module;
  import ecans_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, load = 0, ca_step = 0;
  logic [RULE_AW-1:0] cfg_addr;
  logic [STATE_W-1:0] cfg_data, init_state, up_left, up, up_right, state, state_top;
  logic [STATE_W-1:0] rule [RULE_ENTRIES];
  int checks = 0, failures = 0;

  ca_module #(.IS_TOP(1'b0)) dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .load, .init_state,
    .ca_step, .up_left, .up, .up_right, .state);
  ca_module #(.IS_TOP(1'b1)) dut_top (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .load, .init_state,
    .ca_step, .up_left, .up, .up_right, .state(state_top));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [STATE_W-1:0] expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < RULE_ENTRIES; e++) begin
      @(negedge clk); cfg_we = 1; cfg_addr = RULE_AW'(e); cfg_data = STATE_W'($urandom); rule[e] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    init_state = 2'd3; load = 1; @(negedge clk); load = 0;
    checks++; if (state !== 2'd3 || state_top !== 2'd3) failures++;
    for (int i = 0; i < 300; i++) begin
      up_left = 2'($urandom); up = 2'($urandom); up_right = 2'($urandom);
      ca_step = ($urandom_range(0, 2) != 0);
      expv = ca_step ? rule[{up_left, up, up_right}] : state;
      @(negedge clk);
      checks++;
      if (state !== expv) begin failures++; $display("state %0d exp %0d", state, expv); end
      checks++;
      if (state_top !== 2'd3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
