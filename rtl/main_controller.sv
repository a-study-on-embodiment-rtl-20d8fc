// main_controller: sequences the whole evolvable system.
//
// After `start` it repeats, NGEN+1 times, an evaluation of the population,
// and between evaluations it runs one generation of the genetic algorithm
// processor (`ga_start` / `ga_done`). To evaluate individual i it:
//   1. starts the rule generator, which writes i's rule into the rule tables
//      and loads the initial cells;
//   2. gives ROWS-1 CA clock enables (`ca_step`) so the network develops;
//   3. clears the neurons, the pulse encoders and the fitness evaluator;
//   4. for each time t = T_FIRST..T_LAST it reads NIN past samples
//      y(t), y(t-DELAY), ..., y(t-(NIN-1)*DELAY) and the target y(t+1) from
//      the sample memory (one per cycle, one-cycle read latency). It then runs
//      the network for WIN neuron clock enables (`cn_step`) with the inputs
//      pulse-coded, counts the output node's pulses, and hands the prediction
//      min(count * OUT_SCALE, 65535) and the target to the fitness evaluator;
//   5. writes the resulting fitness into the fitness memory at address i.
// `best_fit` / `best_id` track the fittest individual of the latest
// evaluation. `done` pulses at the end. The roles (GA processor, rule
// generator, network, fitness evaluation under one main controller) and the
// embedding (5 inputs, delay 5, one-step prediction) follow the document;
// the schedule, WIN and the output scaling are this design's.
module main_controller
  import ecans_pkg::*;
#(
  parameter int unsigned POP_N   = POP,
  parameter int unsigned NGEN    = 10,
  parameter int unsigned R       = ROWS,
  parameter int unsigned C       = COLS,
  parameter int unsigned N       = NIN,
  parameter int unsigned DELAY   = 5,
  parameter int unsigned WIN     = 32,
  parameter int unsigned T_FIRST = 20,
  parameter int unsigned T_LAST  = 498,
  parameter int unsigned SAW     = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   done,
  output logic                   busy,
  output logic [15:0]            gen,
  // rule generator
  output logic                   rg_start,
  output logic [ID_W-1:0]        rg_ind,
  input  logic                   rg_done,
  // network
  output logic                   ca_step,
  output logic                   net_clr,
  output logic                   cn_step,
  input  logic [$clog2(C+1)-1:0] out_count,
  // sample memory and pulse encoders
  output logic [SAW-1:0]         s_addr,
  input  logic [15:0]            s_rdata,
  output logic [N*16-1:0]        enc_val,
  // fitness evaluation
  output logic                   fe_clr,
  output logic                   fe_valid,
  output logic [15:0]            fe_d,
  output logic [15:0]            fe_y,
  output logic                   fe_finish,
  input  logic                   fe_done,
  input  logic [15:0]            fe_fit,
  // fitness memory
  output logic                   f_we,
  output logic [ID_W-1:0]        f_addr,
  output logic [15:0]            f_wdata,
  // GA processor
  output logic                   ga_start,
  input  logic                   ga_done,
  output logic [15:0]            best_fit,
  output logic [ID_W-1:0]        best_id
);
  localparam int unsigned OUT_SCALE = (65536 + (C * WIN) / 2) / (C * WIN);
  localparam int unsigned CNT_W     = $clog2(C * WIN + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_IND, S_RULE, S_DEV, S_CLR, S_LD, S_RUN, S_EVAL, S_FIN, S_FWAIT, S_GEN, S_GWAIT
  } state_e;
  state_e state;

  logic [ID_W-1:0]   ind;
  logic [7:0]        step;
  logic [SAW-1:0]    t;
  logic [3:0]        j;
  logic [15:0]       target;
  logic [15:0]       win_cnt;
  logic [CNT_W-1:0]  cnt;
  logic [15:0]       in_q [N];
  logic [31:0]       y_scaled;

  assign busy      = (state != S_IDLE);
  assign rg_start  = (state == S_IND);
  assign rg_ind    = ind;
  assign ca_step   = (state == S_DEV);
  assign net_clr   = (state == S_CLR);
  assign fe_clr    = (state == S_CLR);
  assign cn_step   = (state == S_RUN);
  assign fe_valid  = (state == S_EVAL);
  assign fe_d      = target;
  assign y_scaled  = 32'(cnt) * 32'(OUT_SCALE);
  assign fe_y      = (y_scaled > 32'd65535) ? 16'hFFFF : y_scaled[15:0];
  assign fe_finish = (state == S_FIN);
  assign f_we      = (state == S_FWAIT) && fe_done;
  assign f_addr    = ind;
  assign f_wdata   = fe_fit;
  assign ga_start  = (state == S_GEN) && (32'(gen) != NGEN);

  for (genvar k = 0; k < N; k++) begin : g_enc
    assign enc_val[k*16 +: 16] = in_q[k];
  end

  always_comb begin
    if (32'(j) < N) s_addr = t - SAW'(32'(j) * DELAY);
    else            s_addr = t + SAW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ind      <= '0;
      step     <= '0;
      t        <= '0;
      j        <= '0;
      target   <= '0;
      win_cnt  <= '0;
      cnt      <= '0;
      gen      <= '0;
      done     <= 1'b0;
      best_fit <= '0;
      best_id  <= '0;
      for (int k = 0; k < N; k++) in_q[k] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          gen      <= '0;
          ind      <= '0;
          best_fit <= '0;
          state    <= S_IND;
        end
        S_IND:  state <= S_RULE;
        S_RULE: if (rg_done) begin
          step  <= '0;
          state <= S_DEV;
        end
        S_DEV: begin
          step <= step + 8'd1;
          if (32'(step) == R - 2) state <= S_CLR;
        end
        S_CLR: begin
          t     <= SAW'(T_FIRST);
          j     <= '0;
          state <= S_LD;
        end
        S_LD: begin
          // address j was issued in this cycle; data of j-1 arrives now
          if (j != '0) begin
            if (32'(j) <= N) in_q[j-1] <= s_rdata;
            else             target    <= s_rdata;
          end
          if (32'(j) == N + 1) begin
            win_cnt <= '0;
            cnt     <= '0;
            state   <= S_RUN;
          end
          j <= j + 4'd1;
        end
        S_RUN: begin
          cnt     <= cnt + CNT_W'(out_count);
          win_cnt <= win_cnt + 16'd1;
          if (32'(win_cnt) == WIN - 1) state <= S_EVAL;
        end
        S_EVAL: begin
          j <= '0;
          if (32'(t) == T_LAST) state <= S_FIN;
          else begin
            t     <= t + SAW'(1);
            state <= S_LD;
          end
        end
        S_FIN:  state <= S_FWAIT;
        S_FWAIT: if (fe_done) begin
          if (fe_fit >= best_fit) begin
            best_fit <= fe_fit;
            best_id  <= ind;
          end
          if (32'(ind) == POP_N - 1) state <= S_GEN;
          else begin
            ind   <= ind + ID_W'(1);
            state <= S_IND;
          end
        end
        S_GEN: begin
          ind <= '0;
          if (32'(gen) == NGEN) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_GWAIT;
          end
        end
        S_GWAIT: if (ga_done) begin
          gen      <= gen + 16'd1;
          best_fit <= '0;
          state    <= S_IND;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
