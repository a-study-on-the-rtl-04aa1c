// tb_da_unit: drives a DA unit bit-serially (LSB first, sign bit
// subtracted) with four random 16-bit words and compares the accumulator
// with the inner product of the words and the reference cosine row, for
// every even and odd table in both directions. Also checks the 16-cycle
// compute time: the result is present right after the 16th step.
module tb_da_unit;
  import tb_dct_ref::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic dct, en, first, msb;
  logic [3:0] bitpos, addr;
  logic signed [31:0] acc [8];

  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g
    da_unit #(.K(k), .IS_ODD(1'b0)) u_e (.clk, .rst_n, .dct, .en, .first, .msb,
                                         .bitpos, .addr, .acc(acc[k]));
    da_unit #(.K(k), .IS_ODD(1'b1)) u_o (.clk, .rst_n, .dct, .en, .first, .msb,
                                         .bitpos, .addr, .acc(acc[4+k]));
  end

  // weight of word j in unit u (0..3 even, 4..7 odd) from the 8x8 matrix
  function automatic int w(input bit fwd, input int u, input int j);
    if (u >= 4) return tcoef(2*(u-4)+1, j);     // odd: symmetric
    if (fwd)    return tcoef(2*u, j);
    return tcoef(2*j, u);                       // inverse even: transpose
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] x [4];
    en = 0; first = 0; msb = 0; bitpos = 0; addr = 0; dct = 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 4; j++) x[j] = 16'($urandom);
      if (t == 0) x = '{16'sh7fff, 16'sh7fff, 16'sh7fff, 16'sh7fff};
      if (t == 1) x = '{-16'sd32768, -16'sd32768, -16'sd32768, -16'sd32768};
      dct = t[0];
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        en = 1; first = (b == 0); msb = (b == 15); bitpos = 4'(b);
        addr = {x[0][b], x[1][b], x[2][b], x[3][b]};
      end
      @(negedge clk);
      en = 0;
      for (int u = 0; u < 8; u++) begin
        longint e;
        e = 0;
        for (int j = 0; j < 4; j++) e += longint'(w(dct, u, j)) * x[j];
        checks++;
        if (longint'(acc[u]) != e) begin
          failures++;
          $display("FAIL t=%0d unit %0d got %0d exp %0d", t, u, acc[u], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
