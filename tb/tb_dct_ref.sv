// tb_dct_ref: reference arithmetic for the DCT testbenches, written
// independently of the RTL.
//
// The 8x8 transform matrix is built here from $cos: entry (k,n) is
// cos((2n+1)k*pi/16) (1/sqrt(2) for k = 0), scaled by 2^11 and truncated
// toward minus infinity for the magnitudes, which are the integer cosines the
// hardware uses. A 1D transform is then a plain matrix-vector product,
// rounded by adding half and shifting right, and saturated to 16 bits.
package tb_dct_ref;

  // round-down(2048 * cos(m*pi/16)), m = 0..8
  function automatic int cm(input int m);
    return int'($floor(2048.0 * $cos(m * 3.14159265358979323846 / 16.0)));
  endfunction

  function automatic int tcoef(input int k, input int n);
    int a;
    if (k == 0) return cm(4);
    a = ((2*n + 1) * k) % 32;
    if (a <= 8)       return  cm(a);
    else if (a <= 16) return -cm(16 - a);
    else if (a <= 24) return -cm(a - 16);
    else              return  cm(32 - a);
  endfunction

  // Rounded, saturated scaling; sat_hit reports a clamp.
  function automatic int round_sat(input longint v, input int sh, output bit sat_hit);
    longint r;
    r = (v + (longint'(1) << (sh - 1))) >>> sh;
    sat_hit = 1'b0;
    if (r > 32767)  begin r = 32767;  sat_hit = 1'b1; end
    if (r < -32768) begin r = -32768; sat_hit = 1'b1; end
    return int'(r);
  endfunction

  // Unscaled 1D sums: forward z(k) = sum_n T(k,n) x(n),
  // inverse x(n) = sum_k T(k,n) z(k).
  function automatic longint dot1d(input bit fwd, input int i, input int v [8]);
    longint s;
    s = 0;
    for (int j = 0; j < 8; j++)
      s += fwd ? longint'(tcoef(i, j)) * v[j] : longint'(tcoef(j, i)) * v[j];
    return s;
  endfunction

endpackage
