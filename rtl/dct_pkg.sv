// dct_pkg: constants and coefficient functions shared by the 8-point
// distributed-arithmetic (DA) DCT/IDCT.
//
// The 8-point DCT z = T x is split into an even half and an odd half
// (Chen's decomposition):
//   z(2k)   = sum_n E(k,n) * (x(n) + x(7-n))      n = 0..3
//   z(2k+1) = sum_n O(k,n) * (x(n) - x(7-n))
// E is the 4-point DCT matrix and O the odd-frequency matrix. Both use
// cosines scaled by 2^11 and truncated to integers (1448 = 2048 cos(pi/4),
// and so on); these are the coefficients of the published ROM table.
// O is symmetric, so the same odd table serves both directions; the inverse
// transform uses the transpose of E for its even half.
//
// ROM address convention: bit 3 of a 4-bit ROM address is the bit taken
// from word 0, bit 0 the bit from word 3. With this order the table entries
// (for example 2231 = 783 + 1448 at address 0011 of even ROM 0) come out as
// printed in the published table.
package dct_pkg;

  // Word width of samples and coefficients on the buses.
  localparam int unsigned DW = 16;
  // Accumulator / adder width: eight 4-bit blocks.
  localparam int unsigned AW = 32;
  // Cosine scale: coefficients are round-down(2^11 * cos(m*pi/16)).
  localparam int unsigned CSHIFT = 11;
  // The inverse also applies the 2/N = 1/4 factor so that it undoes the
  // forward transform; the forward transform leaves it out.
  localparam int unsigned SH_DCT  = CSHIFT;
  localparam int unsigned SH_IDCT = CSHIFT + 2;

  localparam int C1 = 2008;
  localparam int C2 = 1892;
  localparam int C3 = 1702;
  localparam int C4 = 1448;
  localparam int C5 = 1137;
  localparam int C6 = 783;
  localparam int C7 = 399;

  // Even matrix E(k,n): row k gives output z(2k), column n the input
  // x(n)+x(7-n).
  function automatic int ceven(input logic [1:0] k, input logic [1:0] n);
    int m [4][4];
    m = '{'{ C4,  C4,  C4,  C4},
          '{ C2,  C6, -C6, -C2},
          '{ C4, -C4, -C4,  C4},
          '{ C6, -C2,  C2, -C6}};
    return m[k][n];
  endfunction

  // Odd matrix O(k,n): row k gives output z(2k+1), column n the input
  // x(n)-x(7-n). Symmetric.
  function automatic int codd(input logic [1:0] k, input logic [1:0] n);
    int m [4][4];
    m = '{'{ C1,  C3,  C5,  C7},
          '{ C3, -C7, -C1, -C5},
          '{ C5, -C1,  C7,  C3},
          '{ C7, -C5,  C3, -C1}};
    return m[k][n];
  endfunction

  // Weight of word j in ROM k. Forward even ROMs use the rows of E, the
  // inverse even ROMs its columns, odd ROMs O in both directions.
  function automatic int weight(input bit is_odd, input bit is_dct,
                                input int k, input int j);
    if (is_odd)      return codd(2'(k), 2'(j));
    else if (is_dct) return ceven(2'(k), 2'(j));
    else             return ceven(2'(j), 2'(k));
  endfunction

  // Content of ROM k at a 4-bit address: the sum of the weights of the
  // words whose bit is 1 (address bit 3 belongs to word 0).
  function automatic int rom_word(input bit is_odd, input bit is_dct,
                                  input int k, input int addr);
    int s;
    s = 0;
    for (int j = 0; j < 4; j++)
      if (((addr >> (3 - j)) & 1) != 0) s += weight(is_odd, is_dct, k, j);
    return s;
  endfunction

endpackage
