// ecans_cell: one cell of the cellular automata neural network, made of a
// cellular automata module, a connection module and a neuron module.
//
// The CA module develops the cell's state on the CA clock enable (`ca_step`)
// from the upper-left, upper and upper-right cells' states and sends it to the
// connection module, which decides which of the neuron's inputs (upper, left,
// right) are connected. The neuron advances on the neuron clock enable
// (`cn_step`). Its output pulse goes to the lower, left and right
// neighbours; they gate it with their own connection modules. `state` and `y`
// are brought out for the neighbours. The three-module structure and the
// neighbour signals follow the document; the timing is this design's.
module ecans_cell
  import ecans_pkg::*;
#(
  parameter bit IS_TOP = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  // rule table configuration (shared by all cells)
  input  logic               cfg_we,
  input  logic [RULE_AW-1:0] cfg_addr,
  input  logic [STATE_W-1:0] cfg_data,
  // development
  input  logic               load,
  input  logic [STATE_W-1:0] init_state,
  input  logic               ca_step,
  input  logic [STATE_W-1:0] up_left,
  input  logic [STATE_W-1:0] up,
  input  logic [STATE_W-1:0] up_right,
  input  logic               left_link,   // left neighbour's lateral-link bit (state bit 1)
  output logic [STATE_W-1:0] state,
  // neural operation
  input  logic               clr,
  input  logic               cn_step,
  input  logic               y_up,
  input  logic               y_left,
  input  logic               y_right,
  output logic               y
);
  logic in_up, in_left, in_right;
  logic signed [15:0] x_unused;  // membrane value, observed in simulation only

  ca_module #(.IS_TOP(IS_TOP)) u_ca (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data, .load, .init_state, .ca_step,
    .up_left, .up, .up_right, .state
  );

  connection_module u_conn (
    .state, .left_link, .y_up, .y_left, .y_right,
    .in_up, .in_left, .in_right
  );

  neuron_module u_neuron (
    .clk, .rst_n, .clr, .cn_step, .in_up, .in_left, .in_right, .y, .x(x_unused)
  );
endmodule
