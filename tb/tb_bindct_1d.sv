// tb_bindct_1d: self-checking testbench of the four-stage 1-D BinDCT.
// Drives random 9-bit rows (plus the extreme rows all -256 and all +255, and
// alternating-sign rows) with valid high on most clocks, and checks that
//  - every output vector equals the integer reference model,
//  - each result appears exactly 4 clocks after its input (pipeline latency),
//  - the result stays within a small bound of the correspondingly scaled
//    floating-point DCT-II (the approximation error of the dyadic lifting).
// Includes a cycle watchdog.
module tb_bindct_1d;
  import bindct_ref_pkg::*;

  localparam int IW = 9;
  localparam int OW = 13;
  localparam int NVEC = 3000;
  localparam int LAT = 4;
  localparam real TOL = 40.0;  // bound against the scaled float DCT, ~2% of full scale

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic signed [IW-1:0] x [8];
  logic X_valid;
  logic signed [OW-1:0] X [8];
  int checks = 0, failures = 0;
  int cyc = 0;
  real max_err = 0.0;

  int hist [NVEC][8];  // every row driven, by sequence number
  int in_q [$];        // sequence numbers of rows still in flight
  int in_t [$];        // the cycle each was presented

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  bindct_1d #(.IN_W(IW), .OUT_W(OW)) dut (.clk, .rst_n, .x_valid, .x, .X_valid, .X);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (rst_n && X_valid) begin
      vec_t v, e;
      int t0;
      real err;
      if (in_q.size() == 0) begin
        failures++;
        $display("output without input at cycle %0d", cyc);
      end else begin
        t0 = in_q.pop_front();
        for (int i = 0; i < 8; i++) v[i] = hist[t0][i];
        t0 = in_t.pop_front();
        e  = ref_1d(v);
        checks++;
        if (cyc - t0 != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - t0, LAT);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (int'(X[k]) != e[k]) begin
            failures++;
            if (failures < 10) $display("X[%0d] got %0d expected %0d", k, X[k], e[k]);
          end
          err = real'(X[k]) - dct_1d(v, k);
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            if (failures < 10) $display("X[%0d]=%0d too far from scaled DCT %f", k, X[k], dct_1d(v, k));
          end
        end
      end
    end
  end

  initial begin
    vec_t v;
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NVEC; t++) begin
      logic vld;
      @(negedge clk);
      vld = (t < 8) || ($urandom_range(4) != 0);
      for (int i = 0; i < 8; i++) begin
        case (t)
          0: v[i] = -256;
          1: v[i] = 255;
          2: v[i] = (i % 2 == 0) ? 255 : -256;
          3: v[i] = (i < 4) ? 255 : -256;
          4: v[i] = ((i == 0) || (i == 3) || (i == 4) || (i == 7)) ? 255 : -256;
          default: v[i] = int'($urandom_range(511)) - 256;
        endcase
        x[i] = IW'(v[i]);
      end
      x_valid = vld;
      if (vld) begin
        for (int i = 0; i < 8; i++) hist[t][i] = v[i];
        in_q.push_back(t);
        in_t.push_back(cyc);
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (in_q.size() != 0) begin
      failures++;
      $display("%0d inputs never produced an output", in_q.size());
    end
    $display("max abs deviation from scaled DCT: %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
