// crc_seg_merge: region 2 of the segmented engine, the merge module.
//
// Region 1 delivers NT_SEG table outputs per segment, each already weighted
// by the segment's position in the word (W columns of the whole word). The
// merge first XORs the tables of each segment into one segment sum (a small
// pipelined XOR tree per segment, shared by all frames), then, for each slot,
// XORs the segment sums selected by that slot's mask. Because every segment
// sum is weighted to the end of the word, slot f's sum is W * B of its
// frame piece with the piece's bits seen as followed by zeros to the end of
// the word; region 4 removes those zeros later.
//
// Timing: LEVELS_A + LEVELS_B registered levels; the masks enter together
// with md (the table outputs) and the sideband (in_sb) leaves aligned with
// the sums. rst_n clears the sideband and the masks, not the sums. The
// two-step structure is this design's choice.
module crc_seg_merge
  import crc_pkg::*;
#(
  parameter int unsigned S      = 64,
  parameter int unsigned NT_SEG = 13,
  parameter int unsigned NSLOT  = 9,
  parameter int unsigned RADIX  = 6,
  parameter int unsigned SB_W   = 1,
  localparam int unsigned LEVELS = tree_levels(NT_SEG, RADIX) + tree_levels(S, RADIX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  crc_t            md      [S][NT_SEG],
  input  logic [S-1:0]    in_mask [NSLOT],
  input  logic [SB_W-1:0] in_sb,
  output crc_t            out_sum [NSLOT],
  output logic [SB_W-1:0] out_sb
);

  localparam int unsigned MB = S * NSLOT;

  crc_t            seg_sum [S];
  logic [MB-1:0]   mask_a;
  logic [SB_W-1:0] sb_a;
  logic [S-1:0]    mask_d  [NSLOT];
  logic [MB-1:0]   mask_in;

  // Masks of all slots, flattened so that they can ride in a sideband.
  always_comb begin
    for (int unsigned f = 0; f < NSLOT; f++) begin
      mask_in[S*f +: S] = in_mask[f];
      mask_d[f]         = mask_a[S*f +: S];
    end
  end

  // Step A: one tree per segment; tree 0 also delays the masks and sideband.
  for (genvar s = 0; s < S; s++) begin : g_seg
    if (s == 0) begin : g_carry
      crc_xor_tree #(.NIN(NT_SEG), .RADIX(RADIX), .SB_W(MB + SB_W)) u_tree (
        .clk, .rst_n,
        .in_x  (md[s]),
        .in_sb ({mask_in, in_sb}),
        .out_x (seg_sum[s]),
        .out_sb({mask_a, sb_a})
      );
    end else begin : g_plain
      logic unused_sb;
      crc_xor_tree #(.NIN(NT_SEG), .RADIX(RADIX), .SB_W(1)) u_tree (
        .clk, .rst_n,
        .in_x  (md[s]),
        .in_sb (1'b0),
        .out_x (seg_sum[s]),
        .out_sb(unused_sb)
      );
    end
  end

  // Step B: one masked tree per slot; tree 0 delays the sideband.
  for (genvar f = 0; f < NSLOT; f++) begin : g_slot
    crc_t masked [S];
    for (genvar s = 0; s < S; s++) begin : g_m
      assign masked[s] = mask_d[f][s] ? seg_sum[s] : '0;
    end
    if (f == 0) begin : g_carry
      crc_xor_tree #(.NIN(S), .RADIX(RADIX), .SB_W(SB_W)) u_tree (
        .clk, .rst_n,
        .in_x  (masked),
        .in_sb (sb_a),
        .out_x (out_sum[f]),
        .out_sb(out_sb)
      );
    end else begin : g_plain
      logic unused_sb;
      crc_xor_tree #(.NIN(S), .RADIX(RADIX), .SB_W(1)) u_tree (
        .clk, .rst_n,
        .in_x  (masked),
        .in_sb (1'b0),
        .out_x (out_sum[f]),
        .out_sb(unused_sb)
      );
    end
  end

endmodule
