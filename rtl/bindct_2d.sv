// bindct_2d: 8x8 block two-dimensional forward BinDCT (top level).
//
// Row-column decomposition: a first 1-D BinDCT transforms each incoming row
// of a block, the transposition matrix turns the eight row results into
// columns, and a second 1-D BinDCT transforms each column. All arithmetic is
// shift-and-add; no multiplier is used.
// Interface: pix[0..7] holds one row of eight signed IN_W-bit samples (for
// 8-bit grey-scale pixels, the value minus 128), qualified by pix_valid. The
// eight rows of a block are presented top to bottom, one per valid clock;
// gaps between rows are allowed. coef[0..7] with coef_valid carries one
// column of the OUT_W-bit signed coefficient block per clock: on the k-th
// valid clock of a block (coef_first marks k = 0), coef[v] is the
// coefficient of vertical frequency v and horizontal frequency k.
// Timing: with rows on eight consecutive clocks, column 0 appears 10 clocks
// after row 7 was presented (4 row pipeline + 2 transposition + 4 column
// pipeline) and the design accepts one row and delivers one column per clock
// without stalls. The coefficients carry the BinDCT scale factors, which a
// quantiser would absorb.
// FRAC (default 0) sets a number of fraction bits carried through both
// passes: the samples enter shifted left by FRAC, so the floor rounding of
// the lifting steps acts below the integer LSB, and the final result is
// rounded back to OUT_W integer bits by a combinational adder after the last
// register. FRAC = 5 gives the variant with a 5-bit fractional part.
// The structure (two 1-D units around a transposition matrix, 9-bit input,
// 17-bit output) and the option of a 5-bit fraction follow the published
// design; the 13-bit width between the passes is this implementation's own,
// chosen to hold the largest row result (eight times the largest input).
module bindct_2d #(
  parameter int IN_W  = bindct_pkg::IN_W,
  parameter int MID_W = bindct_pkg::ROW_W,
  parameter int OUT_W = bindct_pkg::OUT_W,
  parameter int FRAC  = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pix_valid,
  input  logic signed [IN_W-1:0]  pix  [8],
  output logic                    coef_valid,
  output logic                    coef_first,
  output logic signed [OUT_W-1:0] coef [8]
);

  localparam int RW = IN_W + FRAC;   // row pass input, FRAC fraction bits
  localparam int MW = MID_W + FRAC;  // between the passes
  localparam int CW = OUT_W + FRAC;  // column pass output

  logic signed [RW-1:0]    pix_fx [8];
  logic                    row_valid;
  logic signed [MW-1:0]    row_coef [8];
  logic                    col_valid;
  logic                    col_first;
  logic signed [MW-1:0]    col_data [8];
  logic signed [CW-1:0]    col_coef [8];

  // first pipeline of column markers, aligned with the column 1-D unit
  logic [3:0] first_sr;

  always_comb
    for (int i = 0; i < 8; i++) pix_fx[i] = RW'(pix[i]) <<< FRAC;

  bindct_1d #(.IN_W(RW), .OUT_W(MW)) u_row_dct (
    .clk, .rst_n,
    .x_valid(pix_valid), .x(pix_fx),
    .X_valid(row_valid), .X(row_coef)
  );

  transpose_8x8 #(.W(MW)) u_transpose (
    .clk, .rst_n,
    .in_valid(row_valid), .in(row_coef),
    .out_valid(col_valid), .out_first(col_first), .out(col_data)
  );

  bindct_1d #(.IN_W(MW), .OUT_W(CW)) u_col_dct (
    .clk, .rst_n,
    .x_valid(col_valid), .x(col_data),
    .X_valid(coef_valid), .X(col_coef)
  );

  // drop the fraction bits, rounding half up
  if (FRAC == 0) begin : g_int
    assign coef = col_coef;
  end else begin : g_frac
    always_comb
      for (int i = 0; i < 8; i++)
        coef[i] = OUT_W'((col_coef[i] + (CW'(1) <<< (FRAC - 1))) >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) first_sr <= '0;
    else        first_sr <= {first_sr[2:0], col_first};
  end

  assign coef_first = first_sr[3];

endmodule
