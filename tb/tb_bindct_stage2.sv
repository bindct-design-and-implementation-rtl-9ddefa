// tb_bindct_stage2: self-checking testbench of pipeline stage 2 of the
// 1-D BinDCT. Random vectors, with valid high on about three clocks in four,
// are driven into the stage; each output is compared one clock later with the
// integer reference model, and on idle clocks the output is checked to hold
// its previous value. Includes a cycle watchdog.
module tb_bindct_stage2;
  import bindct_ref_pkg::*;

  localparam int IW = 13;
  localparam int W  = 13;
  localparam int NVEC = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IW-1:0] din [8];
  logic out_valid;
  logic signed [W-1:0] dout [8];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  bindct_stage2 #(.W(W)) dut (
    .clk, .rst_n, .a_valid(in_valid), .a(din), .b_valid(out_valid), .b(dout)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int lim);
    return int'($urandom_range(2 * lim - 1)) - lim;
  endfunction

  initial begin
    vec_t v, e, prev;
    for (int i = 0; i < 8; i++) din[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 8; i++) prev[i] = 0;
    for (int t = 0; t < NVEC; t++) begin
      logic vld;
      vld = ($urandom_range(3) != 0);
      for (int i = 0; i < 8; i++) begin
        v[i] = rnd(512);
        din[i] = IW'(v[i]);
      end
      in_valid = vld;
      @(posedge clk);
      #1;
      e = vld ? st2(v) : prev;
      checks++;
      if (out_valid !== vld) begin
        failures++;
        $display("valid mismatch at vector %0d", t);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (int'(dout[i]) != e[i]) begin
          failures++;
          if (failures < 10) $display("vec %0d lane %0d: got %0d expected %0d", t, i, dout[i], e[i]);
        end
      end
      prev = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
