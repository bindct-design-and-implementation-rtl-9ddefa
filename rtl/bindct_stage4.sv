// bindct_stage4: fourth and last pipeline stage of the 1-D BinDCT.
//
// Upper block: the even coefficients X0, X4, X2, X6 are re-timed by one
// register and placed at their output positions. Lower block: two scaled
// lifting rotations produce the odd coefficients
//   X1 = h0 + 3/16*h3,   X7 = 3/16*X1 - h3        (angle pi/16)
//   X5 = h2 + 11/16*h1,  X3 = h1 - 15/32*X5       (angle 3pi/16)
// Interface: a = {X0,X4,X2,X6,h0,h1,h2,h3} in, y = X[0..7] in natural
// frequency order out, each with a valid flag. Timing: one register stage.
// The upper/lower split follows the published design; the coefficient values
// are this implementation's own dyadic approximations.
module bindct_stage4
  import bindct_pkg::*;
#(
  parameter int W = bindct_pkg::ROW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                a_valid,
  input  logic signed [W-1:0] a [8],
  output logic                y_valid,
  output logic signed [W-1:0] y [8]
);

  logic signed [W-1:0] nxt [8];
  calc_t x1, x5;

  always_comb begin
    // upper block: even coefficients
    nxt[0] = a[0];
    nxt[4] = a[1];
    nxt[2] = a[2];
    nxt[6] = a[3];
    // lower block: odd coefficients
    x1     = calc_t'(a[4]) + mul_3_16(calc_t'(a[7]));
    x5     = calc_t'(a[6]) + mul_11_16(calc_t'(a[5]));
    nxt[1] = W'(x1);
    nxt[7] = W'(mul_3_16(x1) - calc_t'(a[7]));
    nxt[5] = W'(x5);
    nxt[3] = W'(calc_t'(a[5]) - mul_15_32(x5));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= a_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       for (int i = 0; i < 8; i++) y[i] <= '0;
    else if (a_valid) y <= nxt;
  end

endmodule
