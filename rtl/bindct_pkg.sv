// bindct_pkg: shared constants and shift-and-add coefficient operators of the
// 8-point forward BinDCT-C (lifting approximation of Chen's fast DCT).
//
// Every multiplication in the transform is by a dyadic constant k/2^n and is
// written here as a sum of shifted copies followed by one arithmetic right
// shift (floor rounding), so the datapath holds adders and wiring only:
//   13/32 x = (8x + 4x + x) >> 5     tan(pi/8)              ~ 0.4142
//   11/32 x = (8x + 2x + x) >> 5     sin(pi/8)cos(pi/8)     ~ 0.3536
//   11/16 x = (8x + 2x + x) >> 4     sin(pi/4), tan(3pi/16) ~ 0.7071, 0.6682
//    3/16 x = (2x + x) >> 4          tan(pi/16), sin(pi/16)cos(pi/16)
//   15/32 x = (16x - x) >> 5         sin(3pi/16)cos(3pi/16) ~ 0.4619
// The word lengths (9-bit signed pixels in, 17-bit signed coefficients out,
// 8x8 blocks) follow the published design; the choice of these particular
// dyadic values (denominators up to 32) and the floor rounding are this
// implementation's own.
package bindct_pkg;

  localparam int IN_W   = 9;   // signed pixel input width
  localparam int ROW_W  = 13;  // width after the row (first) 1-D pass
  localparam int OUT_W  = 17;  // signed 2-D coefficient output width
  localparam int CALC_W = 32;  // width the operators compute in

  typedef logic signed [CALC_W-1:0] calc_t;

  // orientation of a line of the transposition matrix
  typedef enum logic {
    LINE_ROW = 1'b0,  // line i is mem[i][0..7]
    LINE_COL = 1'b1   // line i is mem[0..7][i]
  } line_dir_t;

  function automatic calc_t mul_13_32(input calc_t x);
    return ((x <<< 3) + (x <<< 2) + x) >>> 5;
  endfunction

  function automatic calc_t mul_11_32(input calc_t x);
    return ((x <<< 3) + (x <<< 1) + x) >>> 5;
  endfunction

  function automatic calc_t mul_11_16(input calc_t x);
    return ((x <<< 3) + (x <<< 1) + x) >>> 4;
  endfunction

  function automatic calc_t mul_3_16(input calc_t x);
    return ((x <<< 1) + x) >>> 4;
  endfunction

  function automatic calc_t mul_15_32(input calc_t x);
    return ((x <<< 4) - x) >>> 5;
  endfunction

endpackage
