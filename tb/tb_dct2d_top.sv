// tb_dct2d_top: end-to-end test of the 2D DCT/IDCT at its default sizes.
//
// A memory model serves bus 1 (data one cycle after the read) and collects
// bus 2. Seven 8x8 blocks are issued back to back, GO held until accepted:
// random pixels (DCT), a constant block, a block of 12-bit samples whose column pass saturates,
// IDCT of random coefficients, and the IDCT of the DCT of block 0, which
// must give block 0 back within a small error. Every output word is checked
// against a two-pass reference (rows, then columns, each rounded and
// saturated as the hardware does). The test also counts the mechanisms of
// the design and fails if one never happens: forward blocks (butterfly
// before the ROMs), inverse blocks (butterfly after the ROMs), saturation,
// both 1D units busy at once, both memory banks, GO held off, a mode change
// between consecutive blocks and the row count of 8 that starts a column
// pass. It checks that blocks overlap: the spacing of done pulses must be
// at most 60% of the time one block takes from GO to done.
module tb_dct2d_top;
  import tb_dct_ref::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic go, dct_idct, go_ready, bus1_en, bus1_rd, bus2_en, bus2_wr, done;
  logic [5:0] addr_bus1, addr_bus2, stat_bus;
  logic signed [15:0] data_bus1, data_bus2;

  always #5 clk = ~clk;

  dct2d_top dut (.*);

  localparam int NB = 7;
  int  blk_in  [NB][64];
  int  blk_exp [NB][64];
  bit  blk_dct [NB];
  int  got     [NB][64];
  int  rd_cnt = 0, wr_cnt = 0, dones = 0, cyc = 0;
  int  n_sat = 0, n_overlap = 0, n_bank1 = 0, n_stall = 0, n_switch = 0, n_stat8 = 0;
  int  t_go0 = -1, t_done [NB];
  logic [5:0] prev_stat = '0;

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Two-pass reference: pass 1 over rows, pass 2 over columns.
  task automatic ref2d(input bit fwd, input int xin [64], output int y [64]);
    int mid [64];
    int v [8];
    bit sh;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) v[n] = xin[r*8 + n];
      for (int k = 0; k < 8; k++) begin
        mid[r*8 + k] = round_sat(dot1d(fwd, k, v), fwd ? 11 : 13, sh);
        if (sh) n_sat++;
      end
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = mid[r*8 + c];
      for (int j = 0; j < 8; j++) begin
        y[j*8 + c] = round_sat(dot1d(fwd, j, v), fwd ? 11 : 13, sh);
        if (sh) n_sat++;
      end
    end
  endtask

  // bus 1 memory model and bus 2 collector
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus1_rd && !reset) begin
      data_bus1 <= 16'(blk_in[(rd_cnt / 64) % NB][addr_bus1]);
      rd_cnt <= rd_cnt + 1;
    end
    if (bus2_wr && !reset) begin
      got[(wr_cnt / 64) % NB][addr_bus2] = int'(data_bus2);
      wr_cnt <= wr_cnt + 1;
    end
    if (done && !reset) begin
      t_done[dones % NB] = cyc;
      dones <= dones + 1;
    end
    if (!reset && !dut.u_dpu1.ready && !dut.u_dpu2.ready) n_overlap++;
    if (!reset && dut.tm_we && dut.tm_wbank) n_bank1++;
    if (go && !go_ready && !reset) n_stall++;
    if (!reset && stat_bus == 6'b001000 && prev_stat != 6'b001000) n_stat8++;
    prev_stat = stat_bus;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ----- stimulus
    for (int i = 0; i < 64; i++) begin
      blk_in[0][i] = $urandom_range(0, 255) - 128;                 // pixels
      blk_in[1][i] = $urandom_range(0, 511) - 256;
      blk_in[2][i] = 100;                                           // flat block
      blk_in[3][i] = (i % 2) ? 2047 : 1990;                         // column pass saturates
      blk_in[4][i] = (i < 10) ? $urandom_range(0, 2047) - 1024 : 0; // coefficients
      blk_in[6][i] = $urandom_range(0, 255) - 128;
    end
    blk_dct = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1};
    for (int b = 0; b < NB; b++) if (b != 5) ref2d(blk_dct[b], blk_in[b], blk_exp[b]);
    blk_in[5] = blk_exp[0];                                         // round trip
    ref2d(1'b0, blk_in[5], blk_exp[5]);
    for (int b = 1; b < NB; b++) if (blk_dct[b] != blk_dct[b-1]) n_switch++;

    go = 0; dct_idct = 1; data_bus1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      go = 1; dct_idct = blk_dct[b];
      @(posedge clk);
      while (!go_ready) @(posedge clk);
      if (b == 0) t_go0 = cyc;
      @(negedge clk);
      go = 0;
    end
    while (dones < NB) @(posedge clk);
    repeat (3) @(posedge clk);

    // ----- results
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++)
        chk(got[b][i] == blk_exp[b][i],
            $sformatf("block %0d word %0d got %0d exp %0d", b, i, got[b][i], blk_exp[b][i]));
    for (int i = 0; i < 64; i++)
      chk(got[5][i] - blk_in[0][i] <= 2 && blk_in[0][i] - got[5][i] <= 2,
          $sformatf("round trip word %0d: %0d vs %0d", i, got[5][i], blk_in[0][i]));
    for (int i = 1; i < 64; i++) chk(got[2][i] == 0, "flat block gives only a DC term");
    chk(rd_cnt == 64 * NB && wr_cnt == 64 * NB, "bus word counts");
    begin
      int lat, gap;
      lat = t_done[0] - t_go0;
      gap = t_done[2] - t_done[1];
      $display("GO to done %0d cycles, block spacing %0d cycles", lat, gap);
      chk(gap * 10 <= lat * 6, "blocks do not overlap");
    end
    $display("mechanisms: sat=%0d overlap=%0d bank1=%0d stall=%0d switch=%0d stat8=%0d",
             n_sat, n_overlap, n_bank1, n_stall, n_switch, n_stat8);
    chk(n_sat > 0, "saturation never happened");
    chk(n_overlap > 0, "units never busy together");
    chk(n_bank1 > 0, "second bank never used");
    chk(n_stall > 0, "GO never held off");
    chk(n_switch > 0, "no mode change");
    chk(n_stat8 == NB, "row count 8 not reached once per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
