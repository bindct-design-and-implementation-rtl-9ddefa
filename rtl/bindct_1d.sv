// bindct_1d: 8-point forward BinDCT, four-stage pipeline.
//
// Computes the scaled BinDCT-C transform of eight signed samples with shifts
// and additions only. Each of the four stages works on all eight lanes in
// parallel and ends in a register:
//   stage 1  input butterfly (sums and differences)
//   stage 2  even butterfly; pi/4 lifting rotation of the odd half
//   stage 3  even coefficients X0, X4, X2, X6; odd butterfly
//   stage 4  re-timing of the even coefficients (upper block) and the two
//            odd scaled-lifting rotations giving X1, X7, X5, X3 (lower block)
// Interface: x[0..7] (IN_W bits signed) with x_valid; X[0..7] (OUT_W bits
// signed, natural frequency order) with X_valid. Timing: one vector per clock
// in and out, latency 4 clocks, no stalls. The four-stage parallel pipeline
// and the word lengths follow the published design; the assignment of the
// lifting steps to stages is this implementation's own.
module bindct_1d #(
  parameter int IN_W  = bindct_pkg::IN_W,
  parameter int OUT_W = bindct_pkg::ROW_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    x_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    X_valid,
  output logic signed [OUT_W-1:0] X [8]
);

  logic                    v1, v2, v3;
  logic signed [OUT_W-1:0] p1 [8];
  logic signed [OUT_W-1:0] p2 [8];
  logic signed [OUT_W-1:0] p3 [8];

  bindct_stage1 #(.IN_W(IN_W), .W(OUT_W)) u_stage1 (
    .clk, .rst_n, .x_valid, .x, .y_valid(v1), .y(p1)
  );

  bindct_stage2 #(.W(OUT_W)) u_stage2 (
    .clk, .rst_n, .a_valid(v1), .a(p1), .b_valid(v2), .b(p2)
  );

  bindct_stage3 #(.W(OUT_W)) u_stage3 (
    .clk, .rst_n, .a_valid(v2), .a(p2), .b_valid(v3), .b(p3)
  );

  bindct_stage4 #(.W(OUT_W)) u_stage4 (
    .clk, .rst_n, .a_valid(v3), .a(p3), .y_valid(X_valid), .y(X)
  );

endmodule
