// reproductor: fills the reproduction pool with the instructions of one
// generation.
//
// After `start` it makes POP/2 instructions. For each, two parents are chosen
// by binary tournament: two random IDs are drawn, their fitness values are
// read from the fitness memory (one-cycle read latency) and the fitter one
// wins (ties go to the first). The instruction carries the op-code given on
// `op`, the two winners' IDs, and the directions: in the generation model the
// offspring of instruction k go to positions 2k and 2k+1 of the other
// memory; in the steady-state model they replace the two tournament losers.
// `done` pulses after the last instruction is pushed; a push waits while the
// pool is full. Each instruction takes 7 cycles.
// The document runs a user program on an embedded 8051 core here; this block
// replaces that program with one fixed, hard-wired selection scheme. The
// instruction contents and the use of the fitness memory follow the document;
// tournament selection is this design's choice.
module reproductor
  import ecans_pkg::*;
#(
  parameter int unsigned POP_N = POP,
  parameter logic [31:0] SEED  = 32'h3C6E_F372
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  opcode_t         op,
  output logic            f_re,       // fitness memory read strobe
  output logic [ID_W-1:0] f_addr,     // fitness memory read address
  input  logic [15:0]     f_rdata,    // fitness memory data, one cycle later
  output logic            push,
  output instr_t          instr,
  input  logic            full,
  output logic            busy,
  output logic            done
);
  typedef enum logic [2:0] {S_IDLE, S_DRAW, S_R1, S_R2, S_CMP, S_PUSH} state_e;
  state_e state;

  logic [31:0]     rnd;
  logic [ID_W-1:0] c1, c2, par1, los1, par2, los2;
  logic [15:0]     f1;
  logic            second;
  logic [ID_W-1:0] k;

  rand_gen #(.SEED(SEED)) u_rnd (.clk, .rst_n, .en(1'b1), .rnd);

  function automatic logic [ID_W-1:0] pick(input logic [15:0] r);
    logic [31:0] prod;
    prod = 32'(r) * 32'(POP_N);
    return ID_W'(prod >> 16);
  endfunction

  logic [ID_W-1:0] win, lose;
  always_comb begin
    win  = (f1 >= f_rdata) ? c1 : c2;
    lose = (f1 >= f_rdata) ? c2 : c1;
  end

  assign busy   = (state != S_IDLE);
  assign f_re   = (state == S_R1) || (state == S_R2);
  assign f_addr = (state == S_R1) ? c1 : c2;
  assign push   = (state == S_PUSH) && !full;

  always_comb begin
    instr.op = op;
    instr.p1 = par1;
    instr.p2 = par2;
    if (op.steady) begin
      instr.d1 = los1;
      instr.d2 = los2;
    end else begin
      instr.d1 = ID_W'({k, 1'b0});
      instr.d2 = ID_W'({k, 1'b1});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      c1     <= '0;
      c2     <= '0;
      par1   <= '0;
      par2   <= '0;
      los1   <= '0;
      los2   <= '0;
      f1     <= '0;
      second <= 1'b0;
      k      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k      <= '0;
          second <= 1'b0;
          state  <= S_DRAW;
        end
        S_DRAW: begin
          c1    <= pick(rnd[15:0]);
          c2    <= pick(rnd[31:16]);
          state <= S_R1;
        end
        S_R1: state <= S_R2;
        S_R2: begin
          f1    <= f_rdata;
          state <= S_CMP;
        end
        S_CMP: begin
          if (!second) begin
            par1   <= win;
            los1   <= lose;
            second <= 1'b1;
            state  <= S_DRAW;
          end else begin
            par2   <= win;
            los2   <= lose;
            second <= 1'b0;
            state  <= S_PUSH;
          end
        end
        S_PUSH: if (!full) begin
          if (32'(k) == POP_N / 2 - 1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_DRAW;
          end
          k <= k + ID_W'(1);
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
