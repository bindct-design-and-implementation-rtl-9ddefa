// transpose_8x8: transposition matrix between the row and column passes.
//
// Eight-element lines (rows of an 8x8 block) come in one per valid clock and
// leave as the block's columns, one per clock, using a single 8x8 register
// array. The array is written along alternating directions: one block is
// stored row-wise, the next column-wise, and so on. A stored block is read
// out along the other direction, line 0 first, on the eight clocks after its
// last row arrives; the next block is written along that same read
// direction, so its line i only ever overwrites cells that were read out
// already (line i of the read is at the latest in the same clock, and a read
// uses the old contents). One block of storage thus sustains one line per
// clock without stalls.
// Interface: in[0..7] with in_valid (rows may arrive with any gaps);
// out[0..7] with out_valid and out_first (high with column 0 of a block).
// Timing: column 0 of a block leaves two clocks after its row 7 is presented
// (one clock to start the read, one output register); its eight columns
// leave on consecutive clocks.
// The transposition of an 8x8 block follows the published design; the
// alternating-direction organisation and the handshake are this
// implementation's own.
module transpose_8x8
  import bindct_pkg::*;
#(
  parameter int W = bindct_pkg::ROW_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in  [8],
  output logic                out_valid,
  output logic                out_first,
  output logic signed [W-1:0] out [8]
);

  logic signed [W-1:0] mem [8][8];  // [row][column]

  line_dir_t  wr_dir;      // direction the current block is written along
  logic [2:0] wr_line;     // next line to write
  logic       wr_done;     // this clock writes the last line of a block
  line_dir_t  rd_dir;      // direction the stored block is read along
  logic       rd_active;   // a read-out is in progress
  logic [2:0] rd_line;     // line being read

  assign wr_done = in_valid && (wr_line == 3'd7);

  // write side
  always_ff @(posedge clk) begin
    if (in_valid)
      for (int k = 0; k < 8; k++)
        if (wr_dir == LINE_ROW) mem[wr_line][k] <= in[k];
        else                    mem[k][wr_line] <= in[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_dir  <= LINE_ROW;
      wr_line <= '0;
    end else if (in_valid) begin
      wr_line <= wr_line + 3'd1;
      // the next block is written along the direction this one is read
      if (wr_done) wr_dir <= (wr_dir == LINE_ROW) ? LINE_COL : LINE_ROW;
    end
  end

  // read side: a complete block is read on the eight following clocks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_dir    <= LINE_COL;
      rd_line   <= '0;
    end else if (wr_done) begin
      rd_active <= 1'b1;
      rd_dir    <= (wr_dir == LINE_ROW) ? LINE_COL : LINE_ROW;
      rd_line   <= '0;
    end else if (rd_active) begin
      rd_line <= rd_line + 3'd1;
      if (rd_line == 3'd7) rd_active <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_first <= 1'b0;
      for (int k = 0; k < 8; k++) out[k] <= '0;
    end else begin
      out_valid <= rd_active;
      out_first <= rd_active && (rd_line == 3'd0);
      if (rd_active)
        for (int k = 0; k < 8; k++)
          out[k] <= (rd_dir == LINE_ROW) ? mem[rd_line][k] : mem[k][rd_line];
    end
  end

  // a block can only complete once the previous one is being read out at
  // its last line: rows arrive at most one per clock
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    wr_done |-> (!rd_active || rd_line == 3'd7));

endmodule
