// da_rom: one 16-word ROM table of the distributed-arithmetic 1D DCT/IDCT.
//
// Each DA unit owns one table: entry a holds the sum of the coefficients of
// those four input words whose current bit is 1 (address bit 3 = word 0).
// There are four even tables (outputs z0, z2, z4, z6 or, for the inverse,
// the even half e0..e3) and four odd tables (z1, z3, z5, z7 or o0..o3).
// The odd table is the same in both directions; the even table has a
// forward version (rows of the 4-point DCT matrix) and an inverse version
// (its columns), chosen by the dct input. The inverse even tables and the
// odd tables are the published table; the forward even tables are derived
// from the same coefficients. Entries are 15-bit signed (largest |5571|).
// Contents are computed at elaboration by dct_pkg::rom_word.
// Interface: combinational read, q = ROM[addr].
module da_rom #(
  parameter int unsigned K      = 0,     // table index 0..3
  parameter bit          IS_ODD = 1'b0   // 0: even table, 1: odd table
) (
  input  logic              dct,         // 1: forward DCT, 0: inverse
  input  logic [3:0]        addr,
  output logic signed [15:0] q
);
  logic signed [15:0] fwd [16];
  logic signed [15:0] inv [16];

  for (genvar a = 0; a < 16; a++) begin : g_word
    localparam int WF = dct_pkg::rom_word(IS_ODD, 1'b1, K, a);
    localparam int WI = dct_pkg::rom_word(IS_ODD, 1'b0, K, a);
    assign fwd[a] = 16'(WF);
    assign inv[a] = 16'(WI);
  end

  assign q = dct ? fwd[addr] : inv[addr];
endmodule
