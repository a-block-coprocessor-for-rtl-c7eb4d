// tb_gprs_pkg: reference model shared by the EDC testbenches.
//
// Works on a block held as a bit array, bit 0 first on the wire and of
// highest degree. The remainder is found by schoolbook polynomial long
// division over GF(2) (not by a shift register), and the BCS encoder
// appends the inverted remainder of data * D^L, so that a correct block
// divides to an all-ones remainder.
package tb_gprs_pkg;

  localparam int MAXLEN = 512;
  typedef bit blk_t [MAXLEN];

  function automatic int bcs_len(int cs);
    return (cs == 0) ? 40 : 16;
  endfunction

  function automatic int blk_len(int cs);
    case (cs)
      0: return 224;
      1: return 287;
      2: return 331;
      default: return 447;
    endcase
  endfunction

  // Generator coefficients, index = power of D.
  function automatic bit gcoef(int cs, int pw);
    if (cs == 0) return pw inside {40, 26, 23, 17, 3, 0};
    return pw inside {16, 12, 5, 0};
  endfunction

  // Remainder of b[0..n-1] divided by g; result bit j = coefficient of D^j.
  function automatic logic [39:0] ref_remainder(blk_t b, int n, int cs);
    blk_t w = b;
    int L = bcs_len(cs);
    logic [39:0] r = '0;
    for (int i = 0; i + L < n; i++)
      if (w[i])
        for (int j = 0; j <= L; j++) w[i+j] ^= gcoef(cs, L - j);
    for (int j = 0; j < L; j++) r[j] = w[n-1-j];
    return r;
  endfunction

  function automatic bit passes(blk_t b, int n, int cs);
    logic [39:0] r = ref_remainder(b, n, cs);
    return (cs == 0) ? (r == 40'hFF_FFFF_FFFF) : (r[15:0] == 16'hFFFF);
  endfunction

  // Fill a block with random data followed by its BCS.
  function automatic blk_t make_block(int cs);
    blk_t b;
    int n = blk_len(cs), L = bcs_len(cs);
    logic [39:0] r;
    foreach (b[i]) b[i] = 1'b0;
    for (int i = 0; i < n - L; i++) b[i] = bit'($urandom_range(0, 1));
    r = ref_remainder(b, n, cs);   // data * D^L mod g, parity still zero
    for (int j = 0; j < L; j++) b[n-1-j] = ~r[j];
    return b;
  endfunction

endpackage
