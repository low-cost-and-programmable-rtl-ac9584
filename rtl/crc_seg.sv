// crc_seg: the segmented CRC engine. It takes one DATA_W-bit word per clock
// and can finish several frames in the same word.
//
// The bus is cut into S = DATA_W/SEG_W segments (64-bit by default). A word
// can hold the end of one frame, whole frames and the start of another;
// with frames of at least MIN_FRAME_B bytes at most K = DATA_W/(8*MIN_FRAME_B)
// frames end in one word, so regions 3 and 4 exist in K copies
// (K = 8 at 4096 bits).
//
// Data path:
//   crc_seg_ctrl     assigns the frame pieces of the word to slots  (comb.)
//   crc_stride5_lut  region 1, stride-by-5 tables per segment, weighted by
//                    the segment's place in the word              (1 clock)
//   crc_seg_merge    region 2, per-segment sums, then one masked sum per
//                    slot                                  (LEVELS clocks)
//   crc_seg_state    region 3 per slot, with the state of the open frame
//                    carried to the next word                     (1 clock)
//   crc_go_back x K  region 4 per slot: every piece is computed as if
//                    followed by zeros up to the end of the word, and the
//                    go-back pipeline removes those q bits        (H clocks)
//   crc_lut_cfg      region 5, AXI4-Lite port to rewrite every table
//
// Input format per segment: seg_valid (segment holds frame bytes), seg_sop
// (first segment of a frame), seg_eop (last one) and seg_empty (padding
// bytes at the top of the last segment, which must be zero). Frames start on
// a segment boundary and have no idle segments inside them; a frame open at
// the end of a word continues at segment 0 of the next valid word.
// in_valid qualifies the whole word.
//
// Output: out_valid[f] / out_crc[f] give the CRC of the f-th frame that ended
// in a word, LATENCY clocks after that word. frame_err pulses (registered)
// when a word ends more frames than there are slots.
//
// Table identifiers: region 1 0..S*NT_SEG-1, then T^n (7 tables), the initial
// value tables (ceil(S/32)), then the go-back stages (7 per stage). The copies
// of regions 3 and 4 share identifiers, so one write updates all of them.
module crc_seg
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W      = 4096,
  parameter int unsigned SEG_W       = 64,
  parameter int unsigned MIN_FRAME_B = 64,
  parameter crc_t        POLY        = POLY_CRC32,
  parameter crc_t        INIT        = INIT_CRC32,
  parameter crc_t        XOROUT      = XOROUT_CRC32,
  parameter int unsigned XOR_RADIX   = 6,
  localparam int unsigned S          = DATA_W / SEG_W,
  localparam int unsigned SW         = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned EW         = $clog2(SEG_W / 8),
  localparam int unsigned H          = $clog2(DATA_W / 8),
  localparam int unsigned K          = DATA_W / (8 * MIN_FRAME_B),
  localparam int unsigned NSLOT      = K + 1,
  localparam int unsigned NT_SEG     = n_tables(SEG_W),
  localparam int unsigned NTM        = n_tables(CRC_W),
  localparam int unsigned NIA        = (S + TBL_DEPTH - 1) / TBL_DEPTH,
  localparam int unsigned N_TABLES   = S * NT_SEG + NTM + NIA + NTM * H,
  localparam int unsigned LATENCY    = tree_levels(NT_SEG, XOR_RADIX) +
                                       tree_levels(S, XOR_RADIX) + H + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // frame input
  input  logic               in_valid,
  input  logic [S-1:0]       seg_valid,
  input  logic [S-1:0]       seg_sop,
  input  logic [S-1:0]       seg_eop,
  input  logic [EW-1:0]      seg_empty [S],
  input  logic [DATA_W-1:0]  in_data,
  // CRC outputs, one per slot
  output logic [K-1:0]       out_valid,
  output crc_t               out_crc [K],
  output logic               frame_err,
  // AXI4-Lite table programming port
  input  logic [3:0]         s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [3:0]         s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready
);

  if (K < 1 || DATA_W % SEG_W != 0 || SEG_W % 8 != 0) begin : g_bad
    $error("crc_seg: bad DATA_W / SEG_W / MIN_FRAME_B");
  end

  // Per-word slot information travelling with the data.
  typedef struct packed {
    logic                       valid;
    logic [NSLOT-1:0]           present;
    logic [NSLOT-1:0]           ends;
    logic [NSLOT-1:0]           cont;
    logic [NSLOT-1:0][SW-1:0]   start;
    logic [NSLOT-1:0][H-1:0]    qb;
  } slot_info_t;

  cfg_wr_t          cfg;
  logic [S-1:0]     mask_c [NSLOT];
  logic [S-1:0]     mask_1 [NSLOT];
  logic [NSLOT-1:0] present_c, ends_c, cont_c;
  logic [SW-1:0]    start_c [NSLOT];
  logic [H-1:0]     qb_c    [NSLOT];
  logic             overflow_c;
  slot_info_t       info_c, info_1, info_2;
  crc_t             md [S][NT_SEG];
  crc_t             sum [NSLOT];
  logic [SW-1:0]    start_2 [NSLOT];
  logic [H-1:0]     qb_2    [NSLOT];
  logic [NSLOT-1:0] st_valid;
  crc_t             st_crc [NSLOT];
  logic [H-1:0]     st_qb  [NSLOT];

  // Region 5
  crc_lut_cfg #(.N_TABLES(N_TABLES), .ADDR_W(4)) u_cfg (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .cfg
  );

  crc_seg_ctrl #(.DATA_W(DATA_W), .SEG_W(SEG_W), .NSLOT(NSLOT)) u_ctrl (
    .seg_valid, .seg_sop, .seg_eop, .seg_empty,
    .slot_mask   (mask_c),
    .slot_present(present_c),
    .slot_ends   (ends_c),
    .slot_cont   (cont_c),
    .slot_start  (start_c),
    .slot_qb     (qb_c),
    .overflow    (overflow_c)
  );

  always_comb begin
    info_c.valid   = in_valid;
    info_c.present = in_valid ? present_c : '0;
    info_c.ends    = in_valid ? ends_c : '0;
    info_c.cont    = cont_c;
    for (int unsigned f = 0; f < NSLOT; f++) begin
      info_c.start[f] = start_c[f];
      info_c.qb[f]    = qb_c[f];
    end
  end

  // Region 1 (its output register is stage 1; the slot information and the
  // masks are registered alongside)
  crc_stride5_lut #(
    .DATA_W(DATA_W), .SEG_W(SEG_W), .POLY(POLY), .TBL_BASE(0)
  ) u_r1 (
    .clk, .cfg, .in_data, .md
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      info_1    <= '0;
      frame_err <= 1'b0;
    end else begin
      info_1    <= info_c;
      frame_err <= in_valid && overflow_c;
    end
    mask_1 <= mask_c;
  end

  // Region 2
  crc_seg_merge #(
    .S(S), .NT_SEG(NT_SEG), .NSLOT(NSLOT), .RADIX(XOR_RADIX),
    .SB_W($bits(slot_info_t))
  ) u_r2 (
    .clk, .rst_n,
    .md,
    .in_mask(mask_1),
    .in_sb  (info_1),
    .out_sum(sum),
    .out_sb (info_2)
  );

  always_comb begin
    for (int unsigned f = 0; f < NSLOT; f++) begin
      start_2[f] = info_2.start[f];
      qb_2[f]    = info_2.qb[f];
    end
  end

  // Region 3 copies
  crc_seg_state #(
    .DATA_W(DATA_W), .SEG_W(SEG_W), .NSLOT(NSLOT), .POLY(POLY), .INIT(INIT),
    .TBL_BASE(S * NT_SEG)
  ) u_r3 (
    .clk, .rst_n, .cfg,
    .in_valid  (info_2.valid),
    .in_present(info_2.present),
    .in_ends   (info_2.ends),
    .in_cont   (info_2.cont),
    .in_start  (start_2),
    .in_qb     (qb_2),
    .in_sum    (sum),
    .out_valid (st_valid),
    .out_crc   (st_crc),
    .out_qb    (st_qb)
  );

  // Region 4 copies, one per frame that can end in a word
  for (genvar f = 0; f < K; f++) begin : g_r4
    crc_go_back #(
      .DATA_W(DATA_W), .POLY(POLY), .XOROUT(XOROUT),
      .TBL_BASE(S * NT_SEG + NTM + NIA)
    ) u_r4 (
      .clk, .rst_n, .cfg,
      .in_valid (st_valid[f]),
      .in_crc   (st_crc[f]),
      .in_qb    (st_qb[f]),
      .out_valid(out_valid[f]),
      .out_crc  (out_crc[f])
    );
  end

  // The last slot only holds a frame that stays open; its result is unused.
  logic  unused_last;
  assign unused_last = st_valid[K] ^ (^st_crc[K]) ^ (^st_qb[K]);

  always_ff @(posedge clk) begin
    if (rst_n && in_valid) begin
      a_slots: assert (!overflow_c && !ends_c[K])
        else $error("more frames end in one word than there are slots");
      for (int unsigned s = 0; s < S; s++) begin
        for (int unsigned b = 0; b < SEG_W / 8; b++) begin
          if (seg_valid[s] && seg_eop[s] && b + 32'(seg_empty[s]) >= SEG_W / 8) begin
            a_pad_zero: assert (in_data[SEG_W*s + 8*b +: 8] == 8'h00)
              else $error("non-zero padding byte in segment %0d", s);
          end
        end
      end
    end
  end

endmodule
