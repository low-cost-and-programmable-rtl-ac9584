// crc_stride5_lut: region 1 of both CRC engines, the stride-by-5 lookup of
// the partial products of W * B.
//
// The DATA_W-bit word is cut into segments of SEG_W bits (SEG_W = DATA_W for
// the non-segmented engine, 64 for the segmented one). Each segment is cut
// into 5-bit keys, the last key of a segment holding the remainder bits when
// SEG_W is not a multiple of 5. Key t of segment s addresses one crc_lut5
// whose entry k is the XOR of the columns W[:, j] of the bits j it covers
// that are set in k, W[:, j] = T^(DATA_W-1-j) * S being the effect of data
// bit j on the CRC state at the end of the word. XOR-ing all outputs of one
// segment gives that segment's share of W * B; XOR-ing all outputs gives
// W * B. The remainder table for a segment that is not a multiple of 5 bits
// wide follows the stride-by-5 method; the segmentation is this design's.
//
// Table identifiers on the configuration port are TBL_BASE + s*NT_SEG + t.
// The default content is computed from POLY when the design is elaborated.
//
// Timing: the table outputs are registered, so md is valid one clock after
// in_data. There is no enable: the register follows the input every clock.
module crc_stride5_lut
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W   = 4096,
  parameter int unsigned SEG_W    = DATA_W,
  parameter crc_t        POLY     = POLY_CRC32,
  parameter int unsigned TBL_BASE = 0,
  localparam int unsigned NSEG    = DATA_W / SEG_W,
  localparam int unsigned NT_SEG  = n_tables(SEG_W)
) (
  input  logic              clk,
  input  cfg_wr_t           cfg,
  input  logic [DATA_W-1:0] in_data,
  output crc_t              md [NSEG][NT_SEG]
);

  typedef crc_t cols_t [DATA_W];

  // Columns of W: the last bit of the word enters as S (= POLY), each earlier
  // bit sees one more step T.
  function automatic cols_t calc_w();
    cols_t w;
    w[DATA_W-1] = lfsr_step('0, 1'b1, POLY);
    for (int j = DATA_W - 2; j >= 0; j--) w[j] = lfsr_step(w[j+1], 1'b0, POLY);
    return w;
  endfunction

  localparam cols_t W = calc_w();

  // Column of bit b of key t in segment s, zero past the segment's end.
  function automatic crc_t col(int unsigned s, int unsigned t, int unsigned b);
    int unsigned o = STRIDE * t + b;
    return (o < SEG_W) ? W[SEG_W * s + o] : '0;
  endfunction

  crc_t y [NSEG][NT_SEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    for (genvar t = 0; t < NT_SEG; t++) begin : g_tbl
      localparam int unsigned LO = STRIDE * t;
      localparam int unsigned KW = (SEG_W - LO < STRIDE) ? SEG_W - LO : STRIDE;
      localparam tbl_t INIT_T = tbl_from_cols(col(s, t, 0), col(s, t, 1),
                                              col(s, t, 2), col(s, t, 3),
                                              col(s, t, 4));
      logic [STRIDE-1:0] key;
      assign key = STRIDE'(in_data[SEG_W*s + LO +: KW]);

      crc_lut5 #(
        .TBL_ID(TBL_BASE + s * NT_SEG + t),
        .INIT  (INIT_T)
      ) u_tbl (
        .clk(clk),
        .cfg(cfg),
        .key(key),
        .y  (y[s][t])
      );
    end
  end

  always_ff @(posedge clk) md <= y;

endmodule
