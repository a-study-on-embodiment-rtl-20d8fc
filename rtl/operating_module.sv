// operating_module: crossover and point mutation of two parent individuals.
//
// On `start` the parents are latched into Buffer11 and Buffer12 and the
// op-code is held. In the next cycle the crossover point generator draws the
// points (or none, with probability 1-pc) and the crossover operator's result
// is stored into Buffer21 and Buffer22. The two mask generators are started
// together with the crossover, one per offspring, each with its own random
// source; when their masks are complete (L cycles), the converters invert the
// bits of Buffer21/Buffer22 where the mask is 1 and `done` pulses. Latency
// from `start` to `done` is L+2 cycles; `start` is ignored while busy.
// Buffers, the two mask generators, the converter and the pc/pm rules follow
// the document. Running mask generation in parallel with the crossover (the
// document says mutation is prepared right before crossover to save time) and
// the fixed latency are this design's reading.
module operating_module
  import ecans_pkg::*;
#(
  parameter int unsigned L = CHROM_LEN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  opcode_t      op,
  input  logic [L-1:0] pa,       // parent alpha
  input  logic [L-1:0] pb,       // parent beta
  input  logic [15:0]  pc,       // crossover probability, Q0.16
  input  logic [15:0]  pm,       // mutation probability, Q0.16
  output logic [L-1:0] oa,       // Buffer21
  output logic [L-1:0] ob,       // Buffer22
  output logic         busy,
  output logic         done,
  output logic         crossed   // last operation did a crossover
);
  localparam int unsigned PW = $clog2(L + 1);

  typedef enum logic [1:0] {S_IDLE, S_XO, S_MUT} state_e;
  state_e state;

  logic [L-1:0] buf11, buf12, buf21, buf22;
  opcode_t      op_q;

  // Random sources: one for crossover points, one per mask generator.
  logic [31:0] r_x0, r_x1, r_ma, r_mb;
  logic        ma_rnd_en, mb_rnd_en;
  rand_gen #(.SEED(32'h1D87_2B41)) u_rx0 (.clk, .rst_n, .en(1'b1),      .rnd(r_x0));
  rand_gen #(.SEED(32'h6C07_8965)) u_rx1 (.clk, .rst_n, .en(1'b1),      .rnd(r_x1));
  rand_gen #(.SEED(32'h5BD1_E995)) u_rma (.clk, .rst_n, .en(ma_rnd_en), .rnd(r_ma));
  rand_gen #(.SEED(32'h7FEB_352D)) u_rmb (.clk, .rst_n, .en(mb_rnd_en), .rnd(r_mb));

  logic [PW-1:0] lo, hi;
  logic          xo_hit;
  logic [L-1:0]  ca, cb;

  xover_point_gen #(.L(L)) u_xpg (
    .mode(op_q.xover), .pc, .rnd({r_x1[15:0], r_x0[31:0]}), .lo, .hi, .xo_hit(xo_hit)
  );

  crossover_op #(.L(L)) u_xop (.pa(buf11), .pb(buf12), .lo, .hi, .ca, .cb);

  logic         m_start;
  logic [L-1:0] mask_a, mask_b;
  logic         ma_busy, mb_busy, ma_done, mb_done;

  assign m_start = (state == S_IDLE) && start;

  mask_gen #(.L(L)) u_mga (
    .clk, .rst_n, .start(m_start), .mut_en(op.mut_en), .pm, .rnd(r_ma[31:16]),
    .rnd_en(ma_rnd_en), .mask(mask_a), .busy(ma_busy), .done(ma_done)
  );
  mask_gen #(.L(L)) u_mgb (
    .clk, .rst_n, .start(m_start), .mut_en(op.mut_en), .pm, .rnd(r_mb[31:16]),
    .rnd_en(mb_rnd_en), .mask(mask_b), .busy(mb_busy), .done(mb_done)
  );

  assign oa   = buf21;
  assign ob   = buf22;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      buf11   <= '0;
      buf12   <= '0;
      buf21   <= '0;
      buf22   <= '0;
      op_q    <= '0;
      done    <= 1'b0;
      crossed <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          buf11 <= pa;
          buf12 <= pb;
          op_q  <= op;
          state <= S_XO;
        end
        S_XO: begin
          buf21   <= ca;
          buf22   <= cb;
          crossed <= xo_hit;
          state   <= S_MUT;
        end
        S_MUT: if (!ma_busy && !mb_busy && !m_start) begin
          // Converters: invert the bits selected by the masks.
          buf21 <= buf21 ^ mask_a;
          buf22 <= buf22 ^ mask_b;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Both mask generators run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) ma_done == mb_done);
endmodule
