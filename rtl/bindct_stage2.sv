// bindct_stage2: second pipeline stage of the 1-D BinDCT.
//
// Even half: the second butterfly e0 = s0+s3, e1 = s1+s2, e2 = s1-s2,
// e3 = s0-s3. Odd half, in parallel: the pi/4 plane rotation of (d1, d2)
// realised as three lifting steps with dyadic coefficients
//   v  = d1 - 13/32*d2
//   m6 = d2 + 11/16*v        ~ (d1 + d2)/sqrt(2)
//   m5 = v  - 13/32*m6       ~ (d1 - d2)/sqrt(2)
// d0 and d3 pass through.
// Interface: a = {s0..s3, d0..d3} in, b = {e0,e1,e2,e3,d0,m5,m6,d3} out, each
// with a valid flag. Timing: one register stage. The lifting realisation of
// the rotation follows the BinDCT-C algorithm; the coefficient values and the
// split of work between stages are this implementation's own.
module bindct_stage2
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
  calc_t v, m6, m5;

  always_comb begin
    nxt[0] = a[0] + a[3];
    nxt[1] = a[1] + a[2];
    nxt[2] = a[1] - a[2];
    nxt[3] = a[0] - a[3];
    v      = calc_t'(a[5]) - mul_13_32(calc_t'(a[6]));
    m6     = calc_t'(a[6]) + mul_11_16(v);
    m5     = v - mul_13_32(m6);
    nxt[4] = a[4];
    nxt[5] = W'(m5);
    nxt[6] = W'(m6);
    nxt[7] = a[7];
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
