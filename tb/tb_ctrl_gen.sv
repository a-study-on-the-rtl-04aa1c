// tb_ctrl_gen: runs the control generator with two stand-in 1D units that
// answer a start with eight results after a fixed delay, and checks the
// sequencing of four blocks issued back to back: bus-1 read addresses
// 0..63 in order, register write indices one cycle behind them, row-unit
// starts only after a full row is loaded, transposed memory writes {k, r},
// column reads {k, 0..7} from the bank just filled, bus-2 addresses j*8+k,
// the column start when the row count reaches 8, alternating banks, done
// once per block and GO held off while both banks are full.
module tb_ctrl_gen;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic go, dct_idct, go_ready;
  logic [5:0] addr_bus1, addr_bus2, tm_waddr, tm_raddr, stat_bus;
  logic bus1_en, bus1_rd, bus2_en, bus2_wr, done;
  logic reg1_we, reg2_we, tm_we, tm_wbank, tm_re, tm_rbank;
  logic [2:0] reg1_waddr, reg2_waddr;
  logic dpu1_start, dpu1_dct, dpu1_ready, dpu1_valid, dpu1_last;
  logic dpu2_start, dpu2_dct, dpu2_ready, dpu2_valid, dpu2_last;
  logic [2:0] dpu1_idx, dpu2_idx;

  always #5 clk = ~clk;

  ctrl_gen dut (.*);

  // Stand-in 1D unit: busy for LAT cycles, then eight results.
  int c1 = -1, c2 = -1;
  always_ff @(posedge clk) begin
    if (dpu1_start) c1 <= 0; else if (c1 >= 0 && c1 < 30) c1 <= c1 + 1; else c1 <= -1;
    if (dpu2_start) c2 <= 0; else if (c2 >= 0 && c2 < 30) c2 <= c2 + 1; else c2 <= -1;
  end
  assign dpu1_ready = (c1 < 0);
  assign dpu2_ready = (c2 < 0);
  assign dpu1_valid = (c1 >= 23);
  assign dpu2_valid = (c2 >= 23);
  assign dpu1_idx   = 3'(c1 - 23);
  assign dpu2_idx   = 3'(c2 - 23);
  assign dpu1_last  = (c1 == 30);
  assign dpu2_last  = (c2 == 30);

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  localparam int NBLK = 4;
  int rd_cnt = 0, prev_rd = 0, prev_addr = 0;
  int starts1 = 0, starts2 = 0, wr1 = 0, wr2 = 0, rdt = 0, dones = 0;
  int go_stall = 0, col_start_at8 = 0, bank1_used = 0;
  int row_of_dpu1 = 0, col_of_dpu2 = 0;
  logic [5:0] prev_stat = '0;

  always @(posedge clk) if (rst_n) begin
    // bus 1 reads in order
    if (bus1_rd) begin
      chk(addr_bus1 == 6'(rd_cnt % 64), $sformatf("bus1 addr %0d exp %0d", addr_bus1, rd_cnt % 64));
      chk(bus1_en, "bus1_en with read");
      rd_cnt++;
    end
    chk(reg1_we == 1'(prev_rd), "reg1 write follows read by one cycle");
    if (reg1_we) chk(reg1_waddr == 3'(prev_addr), "reg1 index");
    prev_rd = bus1_rd; prev_addr = addr_bus1[2:0];
    if (dpu1_start) begin
      chk(rd_cnt - 8 * (starts1 + 1) >= 0 && !reg1_we, "row start after full row");
      chk(dpu1_dct == 1'((starts1 / 8) % 2), "row unit mode of the block");
      row_of_dpu1 = starts1 % 8;
      starts1++;
    end
    if (tm_we) begin
      chk(tm_waddr == {dpu1_idx, 3'(row_of_dpu1)}, $sformatf("tm write addr %0d", tm_waddr));
      chk(tm_wbank == 1'((wr1 / 64) % 2), "write bank alternates");
      if (tm_wbank) bank1_used++;
      wr1++;
    end
    if (tm_re) begin
      chk(tm_raddr == {3'((rdt / 8) % 8), 3'(rdt % 8)}, $sformatf("tm read addr %0d", tm_raddr));
      chk(tm_rbank == 1'((rdt / 64) % 2), "read bank alternates");
      if (rdt % 64 == 0) begin
        chk(wr1 >= 64 * (rdt / 64 + 1), "column pass starts only on a full bank");
      end
      rdt++;
    end
    if (dpu2_start) begin
      chk(dpu2_dct == 1'((starts2 / 8) % 2), "column unit mode of the block");
      col_of_dpu2 = starts2 % 8;
      starts2++;
    end
    if (bus2_wr) begin
      chk(addr_bus2 == {dpu2_idx, 3'(col_of_dpu2)}, $sformatf("bus2 addr %0d", addr_bus2));
      chk(bus2_en, "bus2_en with write");
      wr2++;
    end
    if (done) begin
      dones++;
      chk(wr2 == 64 * dones, $sformatf("done after %0d writes", wr2));
    end
    if (go && !go_ready) go_stall++;
    if (stat_bus == 6'b001000 && prev_stat != 6'b001000) col_start_at8++;
    prev_stat = stat_bus;
    chk(stat_bus <= 6'd8, "row count within 0..8");
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    go = 0; dct_idct = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      @(negedge clk);
      go = 1; dct_idct = b[0];
      @(posedge clk);
      while (!go_ready) @(posedge clk);
      @(negedge clk);
      go = 0;
    end
    while (dones < NBLK) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(rd_cnt == 64 * NBLK, $sformatf("reads %0d", rd_cnt));
    chk(wr1 == 64 * NBLK && rdt == 64 * NBLK && wr2 == 64 * NBLK, "word counts");
    chk(starts1 == 8 * NBLK && starts2 == 8 * NBLK, "unit starts");
    chk(go_stall > 0, "GO never held off by full banks");
    chk(bank1_used > 0, "second bank never used");
    chk(col_start_at8 == NBLK, $sformatf("row count reached 8 %0d times", col_start_at8));
    $display("go stalls %0d", go_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
