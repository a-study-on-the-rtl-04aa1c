// tb_image_blocks: image-coding workload for the 2D DCT/IDCT. A 32x32
// 8-bit test image (a gradient plus a pseudo-random texture, generated
// here) is cut into sixteen 8x8 blocks, level-shifted to -128..127 and
// streamed through the forward transform back to back; the sixteen
// coefficient blocks are then streamed through the inverse. Every word is
// compared with the two-pass reference model, the reconstructed image must
// match the original within +/-2, and the steady-state block rate must be
// one block per 275 cycles.
module tb_image_blocks;
  import tb_dct_ref::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, reset = 1'b1;
  logic go, dct_idct, go_ready, bus1_en, bus1_rd, bus2_en, bus2_wr, done;
  logic [5:0] addr_bus1, addr_bus2, stat_bus;
  logic signed [15:0] data_bus1, data_bus2;

  always #5 clk = ~clk;
  dct2d_top dut (.*);

  localparam int NB = 16;
  int img [32][32];
  int src [2*NB][64];     // blocks presented on bus 1
  int got [2*NB][64];
  int rd_cnt = 0, wr_cnt = 0, dones = 0, cyc = 0;
  int t_done [2*NB];

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic ref2d(input bit fwd, input int xin [64], output int y [64]);
    int mid [64];
    int v [8];
    bit sh;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) v[n] = xin[r*8 + n];
      for (int k = 0; k < 8; k++) mid[r*8 + k] = round_sat(dot1d(fwd, k, v), fwd ? 11 : 13, sh);
    end
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) v[r] = mid[r*8 + c];
      for (int j = 0; j < 8; j++) y[j*8 + c] = round_sat(dot1d(fwd, j, v), fwd ? 11 : 13, sh);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (bus1_rd && !reset) begin
      data_bus1 <= 16'(src[rd_cnt / 64][addr_bus1]);
      rd_cnt <= rd_cnt + 1;
    end
    if (bus2_wr && !reset) begin
      got[wr_cnt / 64][addr_bus2] = int'(data_bus2);
      wr_cnt <= wr_cnt + 1;
      // the inverse pass reads what the forward pass wrote
      if (wr_cnt < 64 * NB) src[NB + wr_cnt / 64][addr_bus2] = int'(data_bus2);
    end
    if (done && !reset) begin
      t_done[dones] = cyc;
      dones <= dones + 1;
    end
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e [64];
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++)
        img[y][x] = (4 * x + 3 * y + ((x * 37 + y * 91) % 23)) % 256;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++)
        src[b][i] = img[(b / 4) * 8 + i / 8][(b % 4) * 8 + i % 8] - 128;

    go = 0; dct_idct = 1; data_bus1 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int b = 0; b < 2 * NB; b++) begin
      // the inverse of block b-NB needs that block's coefficients written
      if (b >= NB) while (wr_cnt < 64 * (b - NB + 1)) @(posedge clk);
      @(negedge clk);
      go = 1; dct_idct = (b < NB);
      @(posedge clk);
      while (!go_ready) @(posedge clk);
      @(negedge clk);
      go = 0;
    end
    while (dones < 2 * NB) @(posedge clk);
    repeat (3) @(posedge clk);

    for (int b = 0; b < 2 * NB; b++) begin
      ref2d(b < NB, src[b], e);
      for (int i = 0; i < 64; i++)
        chk(got[b][i] == e[i], $sformatf("block %0d word %0d got %0d exp %0d", b, i, got[b][i], e[i]));
    end
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 64; i++)
        chk(got[NB + b][i] - src[b][i] <= 2 && src[b][i] - got[NB + b][i] <= 2,
            $sformatf("pixel of block %0d word %0d: %0d vs %0d", b, i, got[NB + b][i], src[b][i]));
    for (int b = 2; b < NB; b++)
      chk(t_done[b] - t_done[b-1] == 275, $sformatf("block spacing %0d", t_done[b] - t_done[b-1]));
    $display("forward stream: %0d cycles for %0d blocks", t_done[NB-1] - t_done[0], NB - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
