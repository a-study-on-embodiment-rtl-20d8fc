// pulse_encoder: turns a sample value into a pulse stream whose density is
// the value, so that it can drive the pulse neurons of the input layer.
//
// First-order sigma-delta: on every enabled cycle the unsigned Q0.16 `value`
// is added to a 16-bit accumulator and the carry out is the pulse. Over 2^16
// cycles exactly `value` pulses are produced, and over any window of n cycles
// the count is within one of n*value/2^16. `clr` empties the accumulator. The
// document says only that signals are carried as pulse density; the
// sigma-delta method is this design's choice.
module pulse_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        en,
  input  logic [15:0] value,
  output logic        pulse
);
  logic [15:0] acc;
  logic [16:0] sum;

  assign sum = {1'b0, acc} + {1'b0, value};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      pulse <= 1'b0;
    end else if (clr) begin
      acc   <= '0;
      pulse <= 1'b0;
    end else if (en) begin
      acc   <= sum[15:0];
      pulse <= sum[16];
    end else begin
      pulse <= 1'b0;
    end
  end
endmodule
