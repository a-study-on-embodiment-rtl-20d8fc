// fitness_eval: evaluates how well the network predicted the time series.
//
//   E   = (1/NSAMP) * sum over samples of (d - y)^2
//   fit = 10^(-10 E)
//
// d (desired) and y (predicted) are unsigned Q0.16 fractions. `clr` starts a
// new evaluation; each `sample_valid` adds one squared error (Q0.16, rounded
// down) to a 32-bit sum. `finish` computes, in two cycles, E = sum/NSAMP
// (multiplication by round(2^24/NSAMP)) and then fit = 2^-z with
// z = E * 10 * log2(10), where 10*log2(10) = 33.219 is held as 8504/256.
// 2^-z is the integer part of z as a right shift and the fraction as linear
// interpolation in a 17-point table of 2^(-i/16) (entry i = round(65536 *
// 2^(-i/16)), with 1.0 saturated to 65535). `done` pulses when `fit` and
// `mse` are valid. The error measure and the fitness function are the
// document's; the number formats and the way 10^x is evaluated are this
// design's.
module fitness_eval #(
  parameter int unsigned NSAMP = 479
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        sample_valid,
  input  logic [15:0] d,
  input  logic [15:0] y,
  input  logic        finish,
  output logic        done,
  output logic [15:0] fit,
  output logic [15:0] mse
);
  localparam logic [31:0] RECIP = 32'(((64'd1 << 24) + 64'(NSAMP / 2)) / 64'(NSAMP));
  localparam logic [15:0] Z_MUL = 16'd8504;  // 10*log2(10) in Q8.8

  function automatic logic [16:0] pow2_tab(input logic [4:0] i);
    unique case (i)
      5'd0:  return 17'd65536;  5'd1:  return 17'd62757;  5'd2:  return 17'd60097;
      5'd3:  return 17'd57549;  5'd4:  return 17'd55109;  5'd5:  return 17'd52773;
      5'd6:  return 17'd50535;  5'd7:  return 17'd48393;  5'd8:  return 17'd46341;
      5'd9:  return 17'd44376;  5'd10: return 17'd42495;  5'd11: return 17'd40693;
      5'd12: return 17'd38968;  5'd13: return 17'd37316;  5'd14: return 17'd35734;
      5'd15: return 17'd34219;  default: return 17'd32768;
    endcase
  endfunction

  logic [31:0] acc;
  logic        stage2;
  logic signed [16:0] err;
  logic signed [33:0] err_w;
  logic [33:0] sq;

  assign err = $signed({1'b0, d}) - $signed({1'b0, y});
  assign err_w = 34'(err);
  assign sq    = $unsigned(err_w * err_w);

  // E from the sum (Q0.16, saturated).
  logic [55:0] e_full;
  logic [15:0] e_q;
  assign e_full = 56'(acc) * 56'(RECIP);
  assign e_q    = (e_full[55:40] != '0) ? 16'hFFFF : e_full[39:24];

  // fit = 2^-z, z = E * Z_MUL (Q8.24 -> Q8.16)
  logic [31:0] z;
  logic [15:0] z_int, z_frac;
  logic [16:0] t0, t1, interp;
  logic [28:0] dprod;
  logic [16:0] shifted;
  always_comb begin
    z       = (32'(mse) * 32'(Z_MUL)) >> 8;
    z_int   = z[31:16];
    z_frac  = z[15:0];
    t0      = pow2_tab({1'b0, z_frac[15:12]});
    t1      = pow2_tab({1'b0, z_frac[15:12]} + 5'd1);
    dprod   = 29'(t0 - t1) * 29'(z_frac[11:0]);
    interp  = t0 - 17'(dprod >> 12);
    shifted = (z_int >= 16'd17) ? '0 : (interp >> z_int);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      stage2 <= 1'b0;
      done   <= 1'b0;
      fit    <= '0;
      mse    <= '0;
    end else begin
      done   <= 1'b0;
      stage2 <= 1'b0;
      if (clr) acc <= '0;
      else if (sample_valid) acc <= acc + 32'(sq >> 16);
      if (finish) begin
        mse    <= e_q;
        stage2 <= 1'b1;
      end
      if (stage2) begin
        fit  <= (shifted > 17'd65535) ? 16'hFFFF : shifted[15:0];
        done <= 1'b1;
      end
    end
  end
endmodule
