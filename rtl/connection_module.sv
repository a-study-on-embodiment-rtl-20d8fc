// connection_module: the configurable connection structure around one neuron.
//
// Each neuron input passes through a switch that is open or closed according
// to configuration bits; here the configuration is the cell's CA state, set by
// the cellular automata module. State bit 0 connects the output of the upper
// neuron (or, in the top row, the external input) to this neuron; state bit 1
// links this neuron and its right neighbour in both directions, so the input
// from the right neuron is enabled by this cell's bit 1 and the input from the
// left neuron by the left neighbour's bit 1. A neuron's input from itself is
// always present. Combinational. Configuration-driven switches follow the
// document, which builds them from tri-state buffers on the FPGA's internal
// lines; here each switch is an AND gate, which is the same function on a
// point-to-point wire. The meaning of each state bit is this design's choice.
module connection_module
  import ecans_pkg::*;
(
  input  logic [STATE_W-1:0] state,       // this cell's CA state
  input  logic               left_link,   // left neighbour's lateral-link bit
  input  logic               y_up,        // upper neuron output or external input
  input  logic               y_left,
  input  logic               y_right,
  output logic               in_up,
  output logic               in_left,
  output logic               in_right
);
  assign in_up    = y_up    & state[0];
  assign in_right = y_right & state[1];
  assign in_left  = y_left  & left_link;
endmodule
