// tb_dpu_1d: runs random rows through the 1D unit in both directions and
// compares each of the eight results with the reference matrix product
// (rounded, saturated), checks the output order 0..7 and the latency from
// the start cycle to the first and last result (DCT 26/33, IDCT 18/25
// cycles). Includes large inputs that drive the result into saturation.
module tb_dpu_1d;
  import tb_dct_ref::*;
  int checks = 0, failures = 0, sat_seen = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, dct, ready, out_valid, out_last;
  logic [2:0] out_idx;
  logic signed [15:0] x [8];
  logic signed [15:0] out_data;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dpu_1d dut (.clk, .rst_n, .start, .dct, .x, .ready, .out_valid, .out_idx,
              .out_last, .out_data);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [8];
    int exp [8];
    int t0, first_lat, last_lat;
    bit sh;
    start = 0; dct = 1;
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      bit fwd;
      fwd = (t % 3) != 2;
      for (int i = 0; i < 8; i++) begin
        if (t < 200) v[i] = $signed($urandom_range(0, 4095)) - 2048;
        else         v[i] = $signed($urandom_range(0, 32767)) - 16384;   // |x| < 2^14
      end
      if (t == 5) for (int i = 0; i < 8; i++) v[i] = 16383;               // saturates
      if (t == 6) for (int i = 0; i < 8; i++) v[i] = (i % 2) ? 16383 : -16384;
      for (int k = 0; k < 8; k++) begin
        exp[k] = round_sat(dot1d(fwd, k, v), fwd ? 11 : 13, sh);
        if (sh) sat_seen++;
      end
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1; dct = fwd;
      for (int i = 0; i < 8; i++) x[i] = 16'(v[i]);
      @(posedge clk);
      t0 = cyc;
      @(negedge clk);
      start = 0;
      for (int k = 0; k < 8; k++) begin
        while (!out_valid) @(posedge clk);
        if (k == 0) first_lat = cyc - t0;
        if (k == 7) last_lat = cyc - t0;
        chk(out_idx == 3'(k), $sformatf("order t=%0d k=%0d idx=%0d", t, k, out_idx));
        chk(int'(out_data) == exp[k], $sformatf("t=%0d fwd=%0d k=%0d got %0d exp %0d",
                                               t, fwd, k, out_data, exp[k]));
        chk(out_last == (k == 7), "last flag");
        @(posedge clk);
      end
      chk(first_lat == (fwd ? 26 : 18), $sformatf("first latency %0d", first_lat));
      chk(last_lat  == (fwd ? 33 : 25), $sformatf("last latency %0d", last_lat));
    end
    chk(sat_seen > 0, "saturation never exercised");
    $display("saturated results: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
