// crc_seg_ctrl: frame-to-slot decoder of the segmented CRC engine.
//
// The bus of the segmented engine is cut into S = DATA_W/SEG_W segments.
// Each segment is idle or carries SEG_W/8 bytes of one frame. A frame starts
// at a segment boundary (seg_sop), fills its segments without holes and ends
// in a segment marked seg_eop, whose top seg_empty bytes are padding zeros.
// A frame that is still open at the end of a word continues at segment 0 of
// the next valid word.
//
// The pieces of frames in one word are numbered in bus order: piece f is the
// set of valid segments after the f-th end of frame. Piece f goes to slot f,
// i.e. to copy f of regions 3 and 4. For each slot this block gives the
// segment mask used by the merge module, whether the piece ends a frame in
// this word (ends), whether it continues a frame from the previous word
// (cont, only possible for slot 0), the segment where it starts, and the
// number of bytes between its last valid byte and the end of the word (qb =
// q/8, the go-back amount). NSLOT = (frames per word) + 1: the extra slot
// holds a frame that starts in the word and does not end in it.
//
// Timing: combinational. Frame ends beyond NSLOT-1 are not decoded and are
// flagged by 'overflow'. The slot assignment is this design's choice.
module crc_seg_ctrl
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W = 4096,
  parameter int unsigned SEG_W  = 64,
  parameter int unsigned NSLOT  = 9,
  localparam int unsigned S     = DATA_W / SEG_W,
  localparam int unsigned SW    = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned EW    = $clog2(SEG_W / 8),
  localparam int unsigned H     = $clog2(DATA_W / 8)
) (
  input  logic [S-1:0]     seg_valid,
  input  logic [S-1:0]     seg_sop,
  input  logic [S-1:0]     seg_eop,
  input  logic [EW-1:0]    seg_empty [S],
  output logic [S-1:0]     slot_mask    [NSLOT],
  output logic [NSLOT-1:0] slot_present,
  output logic [NSLOT-1:0] slot_ends,
  output logic [NSLOT-1:0] slot_cont,
  output logic [SW-1:0]    slot_start   [NSLOT],
  output logic [H-1:0]     slot_qb      [NSLOT],
  output logic             overflow
);

  logic [NSLOT-1:0] has_sop;

  always_comb begin
    int unsigned id;
    id = 0;
    overflow = 1'b0;
    has_sop  = '0;
    slot_present = '0;
    slot_ends    = '0;
    for (int unsigned f = 0; f < NSLOT; f++) begin
      slot_mask[f]  = '0;
      slot_start[f] = '0;
      slot_qb[f]    = '0;
    end
    for (int unsigned s = 0; s < S; s++) begin
      if (seg_valid[s]) begin
        if (id < NSLOT) begin
          slot_mask[id][s]  = 1'b1;
          slot_present[id]  = 1'b1;
          if (seg_sop[s]) begin
            has_sop[id]    = 1'b1;
            slot_start[id] = SW'(s);
          end
          if (seg_eop[s]) begin
            slot_ends[id] = 1'b1;
            slot_qb[id]   = H'((S - 1 - s) * (SEG_W / 8)) + H'(seg_empty[s]);
          end
        end else begin
          overflow = 1'b1;
        end
        if (seg_eop[s]) id++;
      end
    end
    slot_cont = slot_present & ~has_sop;
  end

endmodule
