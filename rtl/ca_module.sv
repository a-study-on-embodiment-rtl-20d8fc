// ca_module: the cellular automata part of one cell.
//
// It keeps the cell's CA state. The rule table is a lut_block addressed by
// the states of the upper-left, upper and upper-right cells, in that order
// from the most significant bits. `load` sets the state to `init_state`;
// otherwise, on each CA clock enable `ca_step`, a cell that is not in the top
// row (IS_TOP = 0) takes the rule table's output as its new state. The top
// row keeps the initial cells. Rule-table entries are written through the
// shared configuration port. The neighbourhood (upper-left, upper,
// upper-right) and the rule table stored in RAM follow the document; the
// state width and the order of the address bits are this design's.
module ca_module
  import ecans_pkg::*;
#(
  parameter bit IS_TOP = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  logic [RULE_AW-1:0] cfg_addr,
  input  logic [STATE_W-1:0] cfg_data,
  input  logic               load,
  input  logic [STATE_W-1:0] init_state,
  input  logic               ca_step,
  input  logic [STATE_W-1:0] up_left,
  input  logic [STATE_W-1:0] up,
  input  logic [STATE_W-1:0] up_right,
  output logic [STATE_W-1:0] state
);
  logic [STATE_W-1:0] next;

  lut_block #(.N(RULE_AW), .W(STATE_W)) u_rule_table (
    .clk, .cfg_we, .cfg_addr, .cfg_data, .in({up_left, up, up_right}), .out(next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 state <= '0;
    else if (load)              state <= init_state;
    else if (ca_step && !IS_TOP) state <= next;
  end
endmodule
