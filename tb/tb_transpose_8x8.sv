// tb_transpose_8x8: self-checking testbench of the 8x8 transposition matrix.
// Sends random blocks of rows, first back to back (one row per clock, the
// full-rate case in which a block is read out while the next one is written
// into the same array) and then with random gaps between rows, and checks
// that
//  - every block comes out as its eight columns in order, column 0 flagged,
//  - the eight columns of a block leave on consecutive clocks,
//  - at full rate column 0 leaves two clocks after row 7 went in.
// Includes a cycle watchdog.
module tb_transpose_8x8;

  localparam int W = 13;
  localparam int NBLK = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] din [8];
  logic out_valid, out_first;
  logic signed [W-1:0] dout [8];
  int checks = 0, failures = 0;
  int cyc = 0;

  int blk [NBLK][8][8];
  int row7_cyc [NBLK];
  int ob = 0, oc = 0;         // output block and column counters
  int last_out_cyc = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  transpose_8x8 #(.W(W)) dut (.clk, .rst_n, .in_valid, .in(din), .out_valid, .out_first, .out(dout));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (ob >= NBLK) begin
        failures++;
        $display("extra output column");
      end else begin
        if (out_first != (oc == 0)) begin
          failures++;
          $display("out_first wrong in block %0d column %0d", ob, oc);
        end
        if (oc != 0 && cyc != last_out_cyc + 1) begin
          checks++;
          failures++;
          $display("block %0d column %0d not consecutive", ob, oc);
        end
        if (oc == 0 && ob < 50) begin
          checks++;
          if (cyc - row7_cyc[ob] != 2) begin
            failures++;
            $display("block %0d: column 0 after %0d clocks", ob, cyc - row7_cyc[ob]);
          end
        end
        for (int r = 0; r < 8; r++) begin
          checks++;
          if (int'(dout[r]) != blk[ob][r][oc]) begin
            failures++;
            if (failures < 10) $display("blk %0d col %0d row %0d: got %0d expected %0d",
                                        ob, oc, r, dout[r], blk[ob][r][oc]);
          end
        end
        last_out_cyc = cyc;
        oc++;
        if (oc == 8) begin
          oc = 0;
          ob++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 8; i++) din[i] = '0;
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = int'($urandom_range(8191)) - 4096;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int r = 0; r < 8; r++) begin
        // first 50 blocks back to back, then random gaps
        if (b >= 50)
          while ($urandom_range(2) == 0) begin
            @(negedge clk);
            in_valid = 1'b0;
          end
        @(negedge clk);
        in_valid = 1'b1;
        for (int c = 0; c < 8; c++) din[c] = W'(blk[b][r][c]);
        if (r == 7) row7_cyc[b] = cyc;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (ob != NBLK) begin
      failures++;
      $display("only %0d of %0d blocks came out", ob, NBLK);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
