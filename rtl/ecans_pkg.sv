// ecans_pkg: sizes, instruction format and shared types of the evolvable
// cellular-automata neural system (ECANS).
//
// The network is a grid of ROWS x COLS cells (5 x 10 as in the time-series
// experiment). Each cell holds a cellular-automata (CA) state of STATE_W bits
// that is developed from the states of its upper-left, upper and upper-right
// neighbours through a rule table. An individual of the genetic algorithm is
// the rule table (one STATE_W-bit entry per neighbourhood pattern) followed by
// the initial cells of the top row. Instruction layout (Op-Code, Parent 1 ID,
// Parent 2 ID, Direction 1, Direction 2) follows the published instruction
// format; the field widths and op-code encoding are this design's own choice.
package ecans_pkg;

  // Network geometry (5 x 10 network, five inputs).
  localparam int unsigned ROWS    = 5;
  localparam int unsigned COLS    = 10;
  localparam int unsigned NIN     = 5;

  // Cell state and rule table.
  localparam int unsigned STATE_W      = 2;
  localparam int unsigned NBR          = 3;                      // upper-left, upper, upper-right
  localparam int unsigned RULE_AW      = NBR * STATE_W;          // rule table address bits
  localparam int unsigned RULE_ENTRIES = 1 << RULE_AW;           // 64
  localparam int unsigned RULE_BITS    = RULE_ENTRIES * STATE_W; // 128
  localparam int unsigned INIT_BITS    = COLS * STATE_W;         // 20
  localparam int unsigned CHROM_LEN    = RULE_BITS + INIT_BITS;  // 148

  // Genetic algorithm.
  localparam int unsigned POP  = 20;
  localparam int unsigned ID_W = 5;

  // Sample values and fitness are unsigned Q0.16 fractions.
  localparam int unsigned DATA_W = 16;

  // Crossover modes selected by the op-code.
  typedef enum logic [1:0] {
    XO_NONE   = 2'd0,
    XO_SIMPLE = 2'd1,   // one crossover point
    XO_TWO    = 2'd2    // two crossover points
  } xover_e;

  // Op-code: how crossover and mutation are done and where offspring go.
  typedef struct packed {
    xover_e xover;
    logic   mut_en;     // 0: mask forced to all zeros (no mutation)
    logic   steady;     // 1: steady-state model (one memory), 0: generation model
  } opcode_t;

  typedef struct packed {
    opcode_t         op;
    logic [ID_W-1:0] p1;  // Parent 1 ID
    logic [ID_W-1:0] p2;  // Parent 2 ID
    logic [ID_W-1:0] d1;  // Direction 1: where offspring 1 is stored
    logic [ID_W-1:0] d2;  // Direction 2: where offspring 2 is stored
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

endpackage
