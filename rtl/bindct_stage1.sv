// bindct_stage1: first pipeline stage of the 1-D BinDCT, the input butterfly.
//
// Two groups of four adders work in parallel: adder group 1 forms the sums
// s[i] = x[i] + x[7-i] and adder group 2 the differences d[i] = x[i] - x[7-i]
// (i = 0..3). The input row is sign-extended from IN_W to the datapath width
// W and the results are registered.
// Interface: x[0..7] with x_valid in; y = {s0,s1,s2,s3,d0,d1,d2,d3} with
// y_valid out. Timing: one register stage, y appears one clock after x.
// The data register loads only when x_valid is high so idle cycles do not
// toggle the datapath. The split into two adder groups follows the published
// design; the lane order of y is this implementation's own.
module bindct_stage1 #(
  parameter int IN_W = bindct_pkg::IN_W,
  parameter int W    = bindct_pkg::ROW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                x_valid,
  input  logic signed [IN_W-1:0] x [8],
  output logic                y_valid,
  output logic signed [W-1:0] y [8]
);

  logic signed [W-1:0] xe [8];
  logic signed [W-1:0] nxt [8];

  always_comb begin
    for (int i = 0; i < 8; i++) xe[i] = W'(x[i]);
    for (int i = 0; i < 4; i++) begin
      nxt[i]     = xe[i] + xe[7-i];  // adder group 1: sums
      nxt[4 + i] = xe[i] - xe[7-i];  // adder group 2: differences
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= x_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       for (int i = 0; i < 8; i++) y[i] <= '0;
    else if (x_valid) y <= nxt;
  end

endmodule
