// crc_pkg: types, constants and elaboration-time functions shared by the
// stride-by-5 CRC engines.
//
// The engines compute a CRC over a wide bus with the matrix form of the
// serial LFSR: after n bits the state is C' = T^n * C + W * B, where T is the
// l x l one-step transition matrix and W = [T^(n-1) S, ..., T S, S] maps the
// n data bits to the state. Every matrix-vector product in hardware is done
// with 32-entry "logical tables" addressed by 5 bits (stride-by-5): a table
// returns the XOR of the matrix columns selected by its 5 key bits.
//
// The functions below only compute the *default* table contents from a
// polynomial when the design is elaborated (what an FPGA bitstream would
// hold). At run time the tables can be rewritten through the configuration
// port, so the polynomial is not fixed by the hardware.
//
// Bit conventions (this design's choice; the matrix derivation itself does
// not depend on them):
//  * the LFSR is the bit-reflected (LSB-first) form used by Ethernet CRC-32:
//    step(c, b) = (c >> 1) ^ ((c[0] ^ b) ? POLY : 0), POLY bit-reversed;
//  * data bit j of a word is the j-th bit in time: byte k is data[8k+7:8k]
//    and each byte is taken LSB first. Padding bytes of the last word of a
//    frame are the highest bytes.
// A matrix is stored as an array of columns: m[i] is the image of the basis
// vector e_i, so M * v is the XOR of the m[i] with v[i] = 1.
package crc_pkg;

  // CRC width l. The table count depends on it, so it is fixed per build.
  localparam int unsigned CRC_W = 32;
  // Number of key bits of one logical table (the stride) and its depth.
  localparam int unsigned STRIDE = 5;
  localparam int unsigned TBL_DEPTH = 1 << STRIDE;
  // Width of the table identifier used by the configuration port.
  localparam int unsigned TBL_ID_W = 12;

  typedef logic [CRC_W-1:0] crc_t;
  typedef logic [CRC_W-1:0][CRC_W-1:0] mat_t;   // [column][row]
  typedef crc_t tbl_t [TBL_DEPTH];             // content of one table

  // Default polynomial: CRC-32 of IEEE 802.3 in reflected form, with the
  // matching initial value and final XOR.
  localparam crc_t POLY_CRC32   = 32'hEDB8_8320;
  localparam crc_t INIT_CRC32   = 32'hFFFF_FFFF;
  localparam crc_t XOROUT_CRC32 = 32'hFFFF_FFFF;

  // Write of one table entry, as produced by the configuration port.
  typedef struct packed {
    logic                         we;
    logic [TBL_ID_W-1:0]          tbl;
    logic [STRIDE-1:0]            entry;
    crc_t                         data;
  } cfg_wr_t;

  // One serial LFSR step with input bit b.
  function automatic crc_t lfsr_step(crc_t c, logic b, crc_t poly);
    return (c >> 1) ^ ((c[0] ^ b) ? poly : '0);
  endfunction

  // Inverse of lfsr_step(c, 0). Exists because the polynomial's x^0 term
  // (the MSB of the reflected form) is always set.
  function automatic crc_t lfsr_unstep(crc_t c, crc_t poly);
    crc_t t;
    t = c[CRC_W-1] ? (c ^ poly) : c;
    return {t[CRC_W-2:0], c[CRC_W-1]};
  endfunction

  function automatic mat_t mat_identity();
    mat_t m;
    for (int i = 0; i < CRC_W; i++) m[i] = crc_t'(1) << i;
    return m;
  endfunction

  function automatic crc_t mat_vec(mat_t m, crc_t v);
    crc_t r = '0;
    for (int i = 0; i < CRC_W; i++) if (v[i]) r ^= m[i];
    return r;
  endfunction

  function automatic mat_t mat_mul(mat_t a, mat_t b);
    mat_t m;
    for (int i = 0; i < CRC_W; i++) m[i] = mat_vec(a, b[i]);
    return m;
  endfunction

  // T: one step with a zero input bit.
  function automatic mat_t t_mat(crc_t poly);
    mat_t m;
    for (int i = 0; i < CRC_W; i++) m[i] = lfsr_step(crc_t'(1) << i, 1'b0, poly);
    return m;
  endfunction

  // T^-1.
  function automatic mat_t t_inv_mat(crc_t poly);
    mat_t m;
    for (int i = 0; i < CRC_W; i++) m[i] = lfsr_unstep(crc_t'(1) << i, poly);
    return m;
  endfunction

  // m^e by square and multiply.
  function automatic mat_t mat_pow(mat_t m, int unsigned e);
    mat_t r = mat_identity();
    mat_t p = m;
    int unsigned k = e;
    while (k != 0) begin
      if (k[0]) r = mat_mul(r, p);
      p = mat_mul(p, p);
      k = k >> 1;
    end
    return r;
  endfunction

  // Table content for a key made of up to five matrix columns c0..c4:
  // entry k is the XOR of the columns whose key bit is set.
  function automatic tbl_t tbl_from_cols(crc_t c0, crc_t c1, crc_t c2,
                                         crc_t c3, crc_t c4);
    tbl_t t;
    for (int k = 0; k < TBL_DEPTH; k++) begin
      t[k] = (k[0] ? c0 : '0) ^ (k[1] ? c1 : '0) ^ (k[2] ? c2 : '0) ^
             (k[3] ? c3 : '0) ^ (k[4] ? c4 : '0);
    end
    return t;
  endfunction

  // Table t of a stride-by-5 product with an l x l matrix (keys are bits
  // 5t..5t+4 of the state; bits past CRC_W have zero columns).
  function automatic tbl_t tbl_from_mat(mat_t m, int unsigned t);
    crc_t c [STRIDE];
    for (int b = 0; b < STRIDE; b++)
      c[b] = (STRIDE*t + b < CRC_W) ? m[STRIDE*t + b] : '0;
    return tbl_from_cols(c[0], c[1], c[2], c[3], c[4]);
  endfunction

  // Number of tables needed for a product with a w-bit input.
  function automatic int unsigned n_tables(int unsigned w);
    return (w + STRIDE - 1) / STRIDE;
  endfunction

  // Number of registered levels of an XOR tree of radix r over n inputs.
  function automatic int unsigned tree_levels(int unsigned n, int unsigned r);
    int unsigned lv = 0;
    int unsigned k = n;
    while (k > 1) begin
      k = (k + r - 1) / r;
      lv++;
    end
    return lv;
  endfunction

endpackage
