// tb_da_rom: checks every cell of the published ROM table (inverse-even and
// odd tables) against literal values, and the forward even tables against
// sums of the reference cosine matrix rows.
module tb_da_rom;
  import tb_dct_ref::*;
  int checks = 0, failures = 0;
  logic dct;
  logic [3:0] addr;
  logic signed [15:0] q [8];

  for (genvar k = 0; k < 4; k++) begin : g
    da_rom #(.K(k), .IS_ODD(1'b0)) u_e (.dct, .addr, .q(q[k]));
    da_rom #(.K(k), .IS_ODD(1'b1)) u_o (.dct, .addr, .q(q[4+k]));
  end

  // Rows: address 0..15; columns: ROM0..3 even, ROM0..3 odd.
  // Address 1011 of even ROM 2 is 1892 + 1448 - 1448 = 1892.
  int tbl [16][8] = '{
    '{0,0,0,0,0,0,0,0},
    '{783,-1892,1892,-783,399,-1137,1702,-2008},
    '{1448,-1448,-1448,1448,1137,-2008,399,1702},
    '{2231,-3340,444,665,1536,-3145,2101,-306},
    '{1892,783,-783,-1892,1702,-399,-2008,-1137},
    '{2675,-1109,1109,-2675,2101,-1536,-306,-3145},
    '{3340,-665,-2231,-444,2839,-2407,-1609,565},
    '{4123,-2557,-339,-1227,3238,-3544,93,-1443},
    '{1448,1448,1448,1448,2008,1702,1137,399},
    '{2231,-444,3340,665,2407,565,2839,-1609},
    '{2896,0,0,2896,3145,-306,1536,2101},
    '{3679,-1892,1892,2113,3544,-1443,3238,93},
    '{3340,2231,665,-444,3710,1303,-871,-738},
    '{4123,339,2557,-1227,4109,166,831,-2746},
    '{4788,783,-783,1004,4847,-705,-472,964},
    '{5571,-1109,1109,221,5246,-1842,1230,-1044}};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // inverse direction: the published table
    dct = 1'b0;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (int'(q[r]) != tbl[a][r]) begin
          failures++;
          $display("FAIL idct rom %0d addr %0d got %0d exp %0d", r, a, q[r], tbl[a][r]);
        end
      end
    end
    // forward direction: even ROM k = row 2k of the cosine matrix,
    // odd ROM k = row 2k+1 (restricted to inputs 0..3), bit 3 = input 0
    dct = 1'b1;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      for (int r = 0; r < 8; r++) begin
        int e;
        e = 0;
        for (int j = 0; j < 4; j++)
          if (a[3-j]) e += tcoef((r < 4) ? 2*r : 2*(r-4)+1, j);
        checks++;
        if (int'(q[r]) != e) begin
          failures++;
          $display("FAIL dct rom %0d addr %0d got %0d exp %0d", r, a, q[r], e);
        end
        if (r >= 4) begin   // odd tables are the same in both directions
          checks++;
          if (int'(q[r]) != tbl[a][r]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
