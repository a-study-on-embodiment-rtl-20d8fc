// mask_gen: mutation mask generator of the operating module.
//
// After `start`, one mask bit is made per clock cycle, bit 0 first: the bit is
// 1 when a fresh 16-bit random fraction is smaller than the mutation
// probability pm (Q0.16), and 0 otherwise or when the op-code disables
// mutation. After L cycles the mask covers the whole chromosome and `done`
// pulses for one cycle; `mask` holds its value until the next start. `rnd_en`
// asks the random source for a new number each cycle a bit is made. The
// comparison rule is the document's; making one bit per cycle is this
// design's choice.
module mask_gen
  import ecans_pkg::*;
#(
  parameter int unsigned L = CHROM_LEN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         mut_en,
  input  logic [15:0]  pm,      // mutation probability, Q0.16
  input  logic [15:0]  rnd,
  output logic         rnd_en,
  output logic [L-1:0] mask,
  output logic         busy,
  output logic         done
);
  localparam int unsigned CW = $clog2(L + 1);

  logic [CW-1:0] idx;
  logic          en_q;

  assign rnd_en = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      en_q <= 1'b0;
      mask <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        idx  <= '0;
        busy <= 1'b1;
        en_q <= mut_en;
        mask <= '0;
      end else if (busy) begin
        mask[idx] <= en_q && (rnd < pm);
        if (32'(idx) == L - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        idx <= idx + CW'(1);
      end
    end
  end
endmodule
