// crc_seg_state: region 3 of the segmented engine, one T^n*C + W*B unit per
// slot plus the state carried from word to word.
//
// For each slot f the merge module gives M_f, the W*B share of its frame
// piece weighted to the end of the word. The state of the piece at the end
// of the word is then
//   cont:  T^n * C_carry + M_f   (frame continued from the previous word)
//   else:  T^(DATA_W - SEG_W*a) * INIT + M_f   (frame starts in segment a)
// T^n * C_carry is computed once with stride-by-5 tables (only slot 0 can
// continue a frame). The initial-value terms for the S possible start
// segments are a table of S entries (ceil(S/32) logical tables addressed by
// the start segment); each slot has its own copy, all written together
// because they share their table identifiers. A piece that does not end in
// the word becomes the new C_carry.
//
// Timing: the slot states, their end flags and go-back amounts are
// registered one clock after in_valid. Reset (active low, synchronous)
// clears the valid flags and the carry. Tables: T^n at TBL_BASE..+6, the
// initial-value tables at TBL_BASE+7.. . How the initial value enters is
// this design's choice.
module crc_seg_state
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W   = 4096,
  parameter int unsigned SEG_W    = 64,
  parameter int unsigned NSLOT    = 9,
  parameter crc_t        POLY     = POLY_CRC32,
  parameter crc_t        INIT     = INIT_CRC32,
  parameter int unsigned TBL_BASE = 0,
  localparam int unsigned S       = DATA_W / SEG_W,
  localparam int unsigned SW      = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned H       = $clog2(DATA_W / 8),
  localparam int unsigned NTM     = n_tables(CRC_W),
  localparam int unsigned NIA     = (S + TBL_DEPTH - 1) / TBL_DEPTH,
  localparam int unsigned IW      = (NIA > 1) ? $clog2(NIA) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  cfg_wr_t          cfg,
  input  logic             in_valid,
  input  logic [NSLOT-1:0] in_present,
  input  logic [NSLOT-1:0] in_ends,
  input  logic [NSLOT-1:0] in_cont,
  input  logic [SW-1:0]    in_start [NSLOT],
  input  logic [H-1:0]     in_qb    [NSLOT],
  input  crc_t             in_sum   [NSLOT],
  output logic [NSLOT-1:0] out_valid,
  output crc_t             out_crc  [NSLOT],
  output logic [H-1:0]     out_qb   [NSLOT]
);

  typedef crc_t ia_t [NIA * TBL_DEPTH];

  // Entry a: INIT advanced over the DATA_W - SEG_W*a bits from the start of
  // segment a to the end of the word.
  function automatic ia_t calc_ia();
    ia_t  ia;
    crc_t v = INIT;
    for (int unsigned a = 0; a < NIA * TBL_DEPTH; a++) ia[a] = '0;
    for (int a = S - 1; a >= 0; a--) begin
      for (int unsigned k = 0; k < SEG_W; k++) v = lfsr_step(v, 1'b0, POLY);
      ia[a] = v;
    end
    return ia;
  endfunction

  localparam ia_t IA = calc_ia();

  function automatic tbl_t ia_tbl(int unsigned j);
    tbl_t t;
    for (int unsigned e = 0; e < TBL_DEPTH; e++) t[e] = IA[TBL_DEPTH * j + e];
    return t;
  endfunction

  crc_t c_carry, tn_carry;
  logic carry_act;
  crc_t st [NSLOT];

  crc_mat_lut #(
    .M       (mat_pow(t_mat(POLY), DATA_W)),
    .TBL_BASE(TBL_BASE)
  ) u_tn (
    .clk(clk),
    .cfg(cfg),
    .v  (c_carry),
    .y  (tn_carry)
  );

  for (genvar f = 0; f < NSLOT; f++) begin : g_slot
    crc_t                 ia_out [NIA];
    logic [STRIDE-1:0]    key;
    logic [SW+STRIDE-1:0] start_x;
    logic [IW-1:0]        sel;

    assign start_x = (SW + STRIDE)'(in_start[f]);
    assign key     = start_x[STRIDE-1:0];
    assign sel     = IW'(start_x >> STRIDE);

    for (genvar j = 0; j < NIA; j++) begin : g_ia
      crc_lut5 #(
        .TBL_ID(TBL_BASE + NTM + j),
        .INIT  (ia_tbl(j))
      ) u_ia (
        .clk(clk),
        .cfg(cfg),
        .key(key),
        .y  (ia_out[j])
      );
    end

    assign st[f] = (in_cont[f] ? tn_carry : ia_out[sel]) ^ in_sum[f];

    always_ff @(posedge clk) begin
      out_crc[f] <= st[f];
      out_qb[f]  <= in_qb[f];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= '0;
      carry_act <= 1'b0;
      c_carry   <= '0;
    end else begin
      out_valid <= in_valid ? in_ends : '0;
      if (in_valid) begin
        if (|in_ends) carry_act <= 1'b0;
        for (int unsigned f = 0; f < NSLOT; f++) begin
          if (in_present[f] && !in_ends[f]) begin
            c_carry   <= st[f];
            carry_act <= 1'b1;
          end
        end
      end
    end
  end

  // Only slot 0 can continue a frame, and only when one is open.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      a_cont_slot0: assert ((in_cont >> 1) == '0)
        else $error("frame continuation outside slot 0 (missing start of frame)");
      a_cont_open: assert (!in_cont[0] || carry_act)
        else $error("frame continues but no frame is open");
    end
  end

endmodule
