// neuron_module: a pulse neuron after the Nagumo-Sato chaotic neuron model,
// split into three decaying terms.
//
//   a(t+1) = ke*a(t) + v * I_up(t)                    external input term
//   b(t+1) = kf*b(t) + w * (I_left(t) + I_right(t))   same-layer input term
//   c(t+1) = kr*c(t) - alpha*y(t) - theta*(1 - kr)    refractory (self) term
//   y(t+1) = u(a(t+1) + b(t+1) + c(t+1))              unit step, 1 when > 0
//
// The A, B and C registers hold the three terms and the State register holds
// the output pulse y. Each damping factor is k = 1 - 2^-S, so a register is
// multiplied by k with one shift and one subtraction. Values are signed Q8.8.
// All registers advance together on the neuron clock enable `cn_step`;
// `clr` zeroes them. Inputs are pulses (0/1), so each weight is added when
// its input pulse is present.
// The equations, the A/B/C/State registers and "shift and add" follow the
// document. It gives no weights or constants and no number format. One weight
// per input class, the fixed-point format and the shift values are this
// design's choice.
module neuron_module #(
  parameter int          ACC_W = 16,
  parameter logic signed [15:0] V     = 16'sd256,  // 1.0, weight from the upper neuron
  parameter logic signed [15:0] W     = 16'sd128,  // 0.5, weight from left/right neurons
  parameter logic signed [15:0] ALPHA = 16'sd256,  // 1.0, refractory scaling
  parameter logic signed [15:0] THETA = 16'sd128,  // 0.5, threshold
  parameter int          SA    = 2,                // ke = 1 - 2^-SA = 0.75
  parameter int          SB    = 2,                // kf = 0.75
  parameter int          SC    = 2                 // kr = 0.75
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic cn_step,
  input  logic in_up,
  input  logic in_left,
  input  logic in_right,
  output logic y,
  output logic signed [ACC_W-1:0] x       // internal state a+b+c after the last step
);
  logic signed [ACC_W-1:0] a, b, c;
  logic signed [ACC_W-1:0] a_n, b_n, c_n, x_n;
  logic signed [ACC_W-1:0] v_in, w_l, w_r, refr;

  localparam logic signed [ACC_W-1:0] ZERO    = '0;
  localparam logic signed [ACC_W-1:0] THETA_K = ACC_W'(THETA) >>> SC;  // theta*(1-kr)

  always_comb begin
    v_in = in_up    ? ACC_W'(V)     : ZERO;
    w_l  = in_left  ? ACC_W'(W)     : ZERO;
    w_r  = in_right ? ACC_W'(W)     : ZERO;
    refr = y        ? ACC_W'(ALPHA) : ZERO;
    a_n  = a - (a >>> SA) + v_in;
    b_n  = b - (b >>> SB) + w_l + w_r;
    c_n  = c - (c >>> SC) - refr - THETA_K;
    x_n  = a_n + b_n + c_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= '0; b <= '0; c <= '0; y <= 1'b0; x <= '0;
    end else if (clr) begin
      a <= '0; b <= '0; c <= '0; y <= 1'b0; x <= '0;
    end else if (cn_step) begin
      a <= a_n;
      b <= b_n;
      c <= c_n;
      x <= x_n;
      y <= (x_n > 0);
    end
  end
endmodule
