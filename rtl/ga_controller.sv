// ga_controller: the genetic algorithm controller. It runs one generation per
// `gen_start`: it starts the reproductor, waits until the reproduction pool
// holds the generation's instructions, then executes them one by one.
//
// For each instruction it reads Parent 1 and Parent 2 from the current
// population memory through port A (one-cycle read latency), starts the
// operating module with the op-code, waits for `op_done`, and writes the two
// offspring at Direction 1 and Direction 2. In the generation model (op-code
// `steady` = 0) offspring go to the other memory and the memories swap roles
// (`cur` toggles) when the generation ends; in the steady-state model they go
// back into the current memory. `gen_done` pulses at the end. This sequence
// (reproduce all, then execute all, then reproduce again) follows the
// document; the cycle-level schedule is this design's.
module ga_controller
  import ecans_pkg::*;
#(
  parameter int unsigned L = CHROM_LEN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            gen_start,
  output logic            gen_done,
  output logic            busy,
  output logic            cur,        // population memory holding the current population
  // reproduction module
  output logic            rep_start,
  input  logic            rep_done,
  input  logic            pool_empty,
  input  instr_t          pool_rdata,
  output logic            pool_pop,
  // port A of population memories 0 and 1
  output logic [1:0]      m_en,
  output logic            m_we,
  output logic [ID_W-1:0] m_addr,
  output logic [L-1:0]    m_wdata,
  input  logic [L-1:0]    m_rdata0,
  input  logic [L-1:0]    m_rdata1,
  // operating module
  output logic            op_start,
  output opcode_t         op_code,
  output logic [L-1:0]    op_pa,
  output logic [L-1:0]    op_pb,
  input  logic            op_done,
  input  logic [L-1:0]    op_oa,
  input  logic [L-1:0]    op_ob
);
  typedef enum logic [3:0] {
    S_IDLE, S_REP, S_FETCH, S_RD1, S_RD2, S_RD3, S_WAIT, S_WR1, S_WR2, S_FIN
  } state_e;
  state_e state;

  instr_t       ins;
  logic [L-1:0] pa_q;
  logic         swap;
  logic         src, dst;
  logic [L-1:0] src_rdata;

  assign src       = cur;
  assign dst       = ins.op.steady ? cur : ~cur;
  assign src_rdata = src ? m_rdata1 : m_rdata0;
  assign busy      = (state != S_IDLE);
  assign rep_start = (state == S_IDLE) && gen_start;
  assign pool_pop  = (state == S_FETCH) && !pool_empty;
  assign op_code   = ins.op;
  assign op_pa     = pa_q;
  assign op_pb     = src_rdata;
  assign op_start  = (state == S_RD3);

  always_comb begin
    m_en    = 2'b00;
    m_we    = 1'b0;
    m_addr  = ins.p1;
    m_wdata = op_oa;
    unique case (state)
      S_RD1: begin m_en[src] = 1'b1; m_addr = ins.p1; end
      S_RD2: begin m_en[src] = 1'b1; m_addr = ins.p2; end
      S_WR1: begin m_en[dst] = 1'b1; m_we = 1'b1; m_addr = ins.d1; m_wdata = op_oa; end
      S_WR2: begin m_en[dst] = 1'b1; m_we = 1'b1; m_addr = ins.d2; m_wdata = op_ob; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ins      <= '0;
      pa_q     <= '0;
      swap     <= 1'b0;
      cur      <= 1'b0;
      gen_done <= 1'b0;
    end else begin
      gen_done <= 1'b0;
      unique case (state)
        S_IDLE: if (gen_start) begin
          swap  <= 1'b0;
          state <= S_REP;
        end
        S_REP:   if (rep_done) state <= S_FETCH;
        S_FETCH: begin
          if (pool_empty) state <= S_FIN;
          else begin
            ins   <= pool_rdata;
            state <= S_RD1;
          end
        end
        S_RD1: state <= S_RD2;
        S_RD2: begin
          pa_q  <= src_rdata;
          state <= S_RD3;
        end
        S_RD3:  state <= S_WAIT;
        S_WAIT: if (op_done) state <= S_WR1;
        S_WR1:  state <= S_WR2;
        S_WR2: begin
          if (!ins.op.steady) swap <= 1'b1;
          state <= S_FETCH;
        end
        S_FIN: begin
          if (swap) cur <= ~cur;
          gen_done <= 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
