// bindct_stage3: third pipeline stage of the 1-D BinDCT.
//
// Even half: the four even coefficients are completed.
//   X0 = e0 + e1,  X4 = X0/2 - e1                 (pi/4 butterfly, lifting)
//   X2 = e3 + 13/32*e2,  X6 = 11/32*X2 - e2       (scaled lifting, pi/8)
// Odd half, in parallel: the butterfly
//   h0 = d0 + m6, h1 = d0 - m6, h2 = d3 - m5, h3 = d3 + m5.
// Interface: a = {e0,e1,e2,e3,d0,m5,m6,d3} in, b = {X0,X4,X2,X6,h0,h1,h2,h3}
// out, each with a valid flag. Timing: one register stage. The outputs are
// scaled DCT coefficients (X2 by 1/cos(pi/8), X6 by cos(pi/8), X4 by
// 1/sqrt(2)), the scaling being left to a later quantiser as in BinDCT.
// Coefficients and stage partitioning are this implementation's own.
module bindct_stage3
  import bindct_pkg::*;
#(
  parameter int W = bindct_pkg::ROW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                a_valid,
  input  logic signed [W-1:0] a [8],
  output logic                b_valid,
  output logic signed [W-1:0] b [8]
);

  logic signed [W-1:0] nxt [8];
  calc_t x0, x2;

  always_comb begin
    x0     = calc_t'(a[0]) + calc_t'(a[1]);
    x2     = calc_t'(a[3]) + mul_13_32(calc_t'(a[2]));
    nxt[0] = W'(x0);
    nxt[1] = W'((x0 >>> 1) - calc_t'(a[1]));
    nxt[2] = W'(x2);
    nxt[3] = W'(mul_11_32(x2) - calc_t'(a[2]));
    nxt[4] = a[4] + a[6];
    nxt[5] = a[4] - a[6];
    nxt[6] = a[7] - a[5];
    nxt[7] = a[7] + a[5];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) b_valid <= 1'b0;
    else        b_valid <= a_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       for (int i = 0; i < 8; i++) b[i] <= '0;
    else if (a_valid) b <= nxt;
  end

endmodule
