// crc_ref_pkg: reference model for the CRC testbenches.
//
// Everything here is computed bit by bit, the slow way, so that it does not
// share code with the matrix and table functions of the design:
//  * crc_bytes: the CRC of a byte string (reflected LFSR, LSB first), with
//    initial value and final XOR, as in IEEE 802.3 CRC-32;
//  * step / unstep: one LFSR step and its inverse, the inverse found by
//    trying both possible values of the bit that was shifted out;
//  * table contents for reprogramming an engine with another polynomial.
package crc_ref_pkg;

  typedef logic [31:0] c32_t;

  function automatic c32_t step(c32_t c, logic b, c32_t poly);
    c32_t r;
    r = {1'b0, c[31:1]};
    if (c[0] ^ b) r = r ^ poly;
    return r;
  endfunction

  function automatic c32_t unstep(c32_t c, c32_t poly);
    c32_t a, b;
    a = {c[30:0], 1'b0};
    b = {c[30:0] ^ poly[30:0], 1'b1};
    // only one of the two candidates steps to c
    if (step(a, 1'b0, poly) == c) return a;
    return step(b, 1'b0, poly) == c ? b : 32'hDEAD_BEEF;
  endfunction

  function automatic c32_t crc_bytes(byte unsigned d[$], c32_t poly,
                                     c32_t init, c32_t xorout);
    c32_t c = init;
    foreach (d[i]) for (int b = 0; b < 8; b++) c = step(c, d[i][b], poly);
    return c ^ xorout;
  endfunction

  // State reached from basis vector e_i after k zero steps (k < 0: back).
  function automatic c32_t advance(int i, int k, c32_t poly);
    c32_t c = 32'h1 << i;
    if (k >= 0) for (int s = 0; s < k; s++) c = step(c, 1'b0, poly);
    else        for (int s = 0; s < -k; s++) c = unstep(c, poly);
    return c;
  endfunction

  // Entry 'key' of the table over the five columns cols[base..base+4].
  function automatic c32_t entry_of(c32_t cols[$], int base, int key);
    c32_t e = '0;
    for (int b = 0; b < 5; b++)
      if (key[b] && base + b < cols.size()) e ^= cols[base+b];
    return e;
  endfunction

  // Columns of W for a word of n bits: column j is the effect of data bit j
  // on the state at the end of the word.
  function automatic void w_cols(int n, c32_t poly, ref c32_t cols[$]);
    cols = {};
    for (int j = 0; j < n; j++) begin
      c32_t c = '0;
      c = step(c, 1'b1, poly);
      for (int s = j + 1; s < n; s++) c = step(c, 1'b0, poly);
      cols.push_back(c);
    end
  endfunction

  // Columns of T^k (k may be negative).
  function automatic void t_cols(int k, c32_t poly, ref c32_t cols[$]);
    cols = {};
    for (int i = 0; i < 32; i++) cols.push_back(advance(i, k, poly));
  endfunction

endpackage
