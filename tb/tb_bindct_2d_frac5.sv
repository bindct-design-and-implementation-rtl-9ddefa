// tb_bindct_2d_frac5: end-to-end testbench of the 8x8 2-D forward BinDCT
// with five fraction bits carried through both passes (FRAC = 5); otherwise
// identical to tb_bindct_2d (9-bit samples in, 17-bit coefficients out).
// Workload: a 64x64 8-bit grey-scale test image generated here (smooth
// gradients, a sharp edge pattern and noise), level-shifted by -128 and cut
// into 64 blocks, followed by extreme blocks (all -128/-256, all +255,
// checkerboards) and random 9-bit blocks. The first half of the blocks is
// sent at full rate (one row per clock, back to back), the rest with random
// idle clocks between rows. Checked:
//  - every coefficient against the integer reference model,
//  - at full rate, column 0 of a block appears 10 clocks after its row 7,
//  - the eight columns of a block leave on consecutive clocks,
//  - the deviation from the correspondingly scaled floating-point 2-D DCT
//    stays below 2% of the DC full scale (8 x 8 x 256).
// Mechanisms counted, each must occur: full-rate blocks, blocks with idle
// gaps, blocks read out of the transposition matrix while the next block
// is written into it, and
// blocks driving the row pass to its full 9-bit range.
module tb_bindct_2d_frac5;
  import bindct_ref_pkg::*;

  localparam int NIMG = 64;            // image blocks (64x64 image)
  localparam int NBLK = NIMG + 4 + 60; // + extreme + random blocks
  localparam int LAT  = 10;
  localparam int FRAC = 5;             // fraction bits of the design under test
  localparam real TOL = 0.02 * 16384.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pix_valid = 1'b0;
  logic signed [8:0] pix [8];
  logic coef_valid, coef_first;
  logic signed [16:0] coef [8];
  int checks = 0, failures = 0;
  int cyc = 0;

  int blk [NBLK][8][8];
  int row7_cyc [NBLK];
  int row0_cyc [NBLK];
  int ob = 0, oc = 0;
  int last_out_cyc = 0;
  blk_t exp_c;
  real max_err = 0.0;

  int n_full_rate = 0, n_gapped = 0, n_overlap = 0, n_extreme = 0;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  bindct_2d #(.FRAC(FRAC)) dut (.clk, .rst_n, .pix_valid, .pix, .coef_valid, .coef_first, .coef);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dct2(input int b, input int v, input int u);
    real pi = 3.14159265358979;
    real acc = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        acc += real'(blk[b][i][j]) * $cos(real'((2 * i + 1) * v) * pi / 16.0)
                                   * $cos(real'((2 * j + 1) * u) * pi / 16.0);
    return acc * bin_scale(v) * bin_scale(u);
  endfunction

  always @(posedge clk) begin
    if (rst_n && coef_valid) begin
      checks++;
      if (ob >= NBLK) begin
        failures++;
        $display("extra output column");
      end else begin
        if (oc == 0) begin
          blk_t p;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) p[i][j] = blk[ob][i][j];
          exp_c = ref_2d(p, FRAC);
          // next block already entering while this one is still inside
          if (ob + 1 < NBLK && row0_cyc[ob + 1] != 0 && row0_cyc[ob + 1] < cyc) n_overlap++;
          if (row7_cyc[ob] != 0 && ob < NBLK / 2) begin
            checks++;
            if (cyc - row7_cyc[ob] != LAT) begin
              failures++;
              $display("block %0d: latency %0d, expected %0d", ob, cyc - row7_cyc[ob], LAT);
            end
          end
        end
        if (coef_first != (oc == 0)) begin
          failures++;
          $display("coef_first wrong, block %0d column %0d", ob, oc);
        end
        if (oc != 0) begin
          checks++;
          if (cyc != last_out_cyc + 1) begin
            failures++;
            $display("block %0d column %0d not consecutive", ob, oc);
          end
        end
        for (int v = 0; v < 8; v++) begin
          real err;
          checks++;
          if (int'(coef[v]) != exp_c[v][oc]) begin
            failures++;
            if (failures < 10) $display("blk %0d Y[%0d][%0d]: got %0d expected %0d",
                                        ob, v, oc, coef[v], exp_c[v][oc]);
          end
          err = real'(coef[v]) - dct2(ob, v, oc);
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("blk %0d Y[%0d][%0d]=%0d far from scaled DCT %f", ob, v, oc, coef[v], dct2(ob, v, oc));
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

  function automatic int image_pixel(input int y, input int x);
    int p;
    if (y < 32) p = 4 * x + 2 * y;                       // smooth gradient
    else if (x < 32) p = (((x / 4) + (y / 4)) % 2 == 1) ? 230 : 20;  // edges
    else p = 128 + int'($urandom_range(100)) - 50;       // noise
    if (p > 255) p = 255;
    if (p < 0) p = 0;
    return p;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) pix[i] = '0;
    // image blocks, level-shifted
    for (int b = 0; b < NIMG; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          blk[b][r][c] = image_pixel(8 * (b / 8) + r, 8 * (b % 8) + c) - 128;
    // extreme blocks
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        blk[NIMG][r][c]     = -256;
        blk[NIMG + 1][r][c] = 255;
        blk[NIMG + 2][r][c] = ((r + c) % 2 == 0) ? 255 : -256;
        blk[NIMG + 3][r][c] = ((r / 4 + c / 4) % 2 == 0) ? -256 : 255;
      end
    for (int b = NIMG + 4; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) blk[b][r][c] = int'($urandom_range(511)) - 256;
    for (int b = 0; b < NBLK; b++) begin
      row7_cyc[b] = 0;
      row0_cyc[b] = 0;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      bit gapped, extreme;
      gapped = 1'b0;
      extreme = 1'b0;
      for (int r = 0; r < 8; r++) begin
        if (b >= NBLK / 2)
          while ($urandom_range(3) == 0) begin
            @(negedge clk);
            pix_valid = 1'b0;
            gapped = 1'b1;
          end
        @(negedge clk);
        pix_valid = 1'b1;
        for (int c = 0; c < 8; c++) begin
          pix[c] = 9'(blk[b][r][c]);
          if (blk[b][r][c] == -256 || blk[b][r][c] == 255) extreme = 1'b1;
        end
        if (r == 0) row0_cyc[b] = cyc;
        if (r == 7 && !gapped) row7_cyc[b] = cyc;
      end
      if (gapped) n_gapped++;
      else        n_full_rate++;
      if (extreme) n_extreme++;
    end
    @(negedge clk);
    pix_valid = 1'b0;
    repeat (30) @(posedge clk);
    checks++;
    if (ob != NBLK) begin
      failures++;
      $display("only %0d of %0d blocks came out", ob, NBLK);
    end
    $display("full-rate blocks %0d, gapped blocks %0d, overlapped blocks %0d, full-range blocks %0d",
             n_full_rate, n_gapped, n_overlap, n_extreme);
    $display("max deviation from scaled float DCT: %f (%f %% of DC full scale)",
             max_err, 100.0 * max_err / 16384.0);
    checks += 4;
    if (n_full_rate == 0) begin failures++; $display("no full-rate block"); end
    if (n_gapped == 0)    begin failures++; $display("no gapped block"); end
    if (n_overlap == 0)   begin failures++; $display("no overlapped block"); end
    if (n_extreme == 0)   begin failures++; $display("no full-range block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
