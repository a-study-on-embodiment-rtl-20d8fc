// rule_generator: turns one individual into the network's cellular automata
// rule and initial cells.
//
// On `start` it reads individual `ind` from the current population memory
// (one-cycle read latency). The individual is coded as follows. Bits
// [STATE_W*e +: STATE_W] are the new state for neighbourhood pattern e
// (e = {upper-left, upper, upper-right} states), for e = 0..RULE_ENTRIES-1.
// The INIT_BITS bits above them are the initial cells of the top row,
// column 0 lowest. The generator writes one rule-table entry per cycle
// through the configuration port. It then pulses `load` with the initial
// row, and pulses `done` in the next cycle. From `start` to `done` takes
// RULE_ENTRIES + 4 cycles. The document says only that the rule generator
// decodes each individual into the CA rule stored in the rule tables; this
// direct coding is this design's choice.
module rule_generator
  import ecans_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ID_W-1:0]      ind,
  output logic                 done,
  output logic [ID_W-1:0]      m_addr,
  input  logic [CHROM_LEN-1:0] m_rdata,
  output logic                 cfg_we,
  output logic [RULE_AW-1:0]   cfg_addr,
  output logic [STATE_W-1:0]   cfg_data,
  output logic                 load,
  output logic [INIT_BITS-1:0] init_row
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_LATCH, S_CFG, S_INIT} state_e;
  state_e state;

  logic [CHROM_LEN-1:0] chrom;
  logic [RULE_AW-1:0]   e;
  logic [ID_W-1:0]      ind_q;

  assign m_addr   = ind_q;
  assign cfg_we   = (state == S_CFG);
  assign cfg_addr = e;
  assign cfg_data = chrom[32'(e) * STATE_W +: STATE_W];
  assign load     = (state == S_INIT);
  assign init_row = chrom[RULE_BITS +: INIT_BITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      chrom <= '0;
      e     <= '0;
      ind_q <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ind_q <= ind;
          state <= S_RD;
        end
        S_RD:    state <= S_LATCH;
        S_LATCH: begin
          chrom <= m_rdata;
          e     <= '0;
          state <= S_CFG;
        end
        S_CFG: begin
          e <= e + RULE_AW'(1);
          if (e == RULE_AW'(RULE_ENTRIES - 1)) state <= S_INIT;
        end
        S_INIT: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
