// ca_neural_network: the grid of ROWS x COLS cells (5 x 10), with the input
// layer above it and one output node below it.
//
// Development: `load` writes the initial cells (`init_row`) into the top row
// and clears the other rows. Each `ca_step` then lets every lower cell take
// the rule table's answer for its upper-left, upper and upper-right
// neighbours. After ROWS-1 steps row r holds the r-th development level, the
// same result as growing the network one level at a time. Cells outside the
// grid read as state 0. The rule table of every cell is written through the
// shared configuration port, so all cells follow the same rule.
// Operation: on each `cn_step` all neurons advance together. Input k (a pulse
// stream) feeds the top-row cells c with k = c*NIN/COLS (two cells per input
// for 5 inputs and 10 columns). Every bottom-row neuron drives the output
// node, and `out_count` is the number of bottom-row pulses in the current
// step. `states` and `ys` give every cell's state and output, row 0 first.
// Grid size, inputs and the single output node follow the document; the
// input-to-column mapping and the grid boundary are this design's.
module ca_neural_network
  import ecans_pkg::*;
#(
  parameter int unsigned R = ROWS,
  parameter int unsigned C = COLS,
  parameter int unsigned N = NIN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       cfg_we,
  input  logic [RULE_AW-1:0]         cfg_addr,
  input  logic [STATE_W-1:0]         cfg_data,
  input  logic                       load,
  input  logic [C*STATE_W-1:0]       init_row,
  input  logic                       ca_step,
  input  logic                       clr,
  input  logic                       cn_step,
  input  logic [N-1:0]               in_pulse,
  output logic [$clog2(C+1)-1:0]     out_count,
  output logic [R*C*STATE_W-1:0]     states,
  output logic [R*C-1:0]             ys
);
  logic [STATE_W-1:0] st [R][C];
  logic               yy [R][C];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < C; c++) begin : g_col
      logic [STATE_W-1:0] ul, u, ur, init;
      logic               llink, yup, yl, yr;

      if (r == 0) begin : g_top
        assign ul   = '0;
        assign u    = '0;
        assign ur   = '0;
        assign init = init_row[c*STATE_W +: STATE_W];
        assign yup  = in_pulse[(c * N) / C];
      end else begin : g_inner
        assign ul   = (c > 0)     ? st[r-1][(c > 0) ? c-1 : 0] : '0;
        assign u    = st[r-1][c];
        assign ur   = (c < C - 1) ? st[r-1][(c < C - 1) ? c+1 : c] : '0;
        assign init = '0;
        assign yup  = yy[r-1][c];
      end

      if (c > 0) begin : g_l
        assign llink = st[r][c-1][1];
        assign yl    = yy[r][c-1];
      end else begin : g_l0
        assign llink = 1'b0;
        assign yl    = 1'b0;
      end
      if (c < C - 1) begin : g_r
        assign yr = yy[r][c+1];
      end else begin : g_r0
        assign yr = 1'b0;
      end

      ecans_cell #(.IS_TOP(r == 0)) u_cell (
        .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_data,
        .load, .init_state(init), .ca_step,
        .up_left(ul), .up(u), .up_right(ur), .left_link(llink), .state(st[r][c]),
        .clr, .cn_step, .y_up(yup), .y_left(yl), .y_right(yr), .y(yy[r][c])
      );

      assign states[(r*C + c)*STATE_W +: STATE_W] = st[r][c];
      assign ys[r*C + c] = yy[r][c];
    end
  end

  always_comb begin
    out_count = '0;
    for (int unsigned c = 0; c < C; c++)
      out_count = out_count + {{($clog2(C+1)-1){1'b0}}, yy[R-1][c]};
  end
endmodule
