// crc_xor_tree: region 2, the pipelined XOR tree that adds up partial
// products.
//
// NIN CRC_W-bit inputs are reduced RADIX at a time; every level of the tree
// is followed by a register, so the sum appears LEVELS = ceil(log_RADIX NIN)
// clocks after the inputs. Splitting the XOR over several registered levels
// instead of one wide XOR keeps each level to about one 6-input LUT of
// logic, which is what lets the engine run at a high clock rate. The radix
// is this design's choice.
//
// A sideband of SB_W bits (valid, frame flags, ...) travels through the same
// number of registers so that it stays aligned with the sum. Only the
// sideband is reset (synchronous, active low), so that no valid flag left
// from power-up comes out after reset; the sums need none. There is no
// enable: the pipeline advances every clock.
module crc_xor_tree
  import crc_pkg::*;
#(
  parameter int unsigned NIN   = 820,
  parameter int unsigned RADIX = 6,
  parameter int unsigned SB_W  = 1,
  localparam int unsigned LEVELS = tree_levels(NIN, RADIX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  crc_t            in_x [NIN],
  input  logic [SB_W-1:0] in_sb,
  output crc_t            out_x,
  output logic [SB_W-1:0] out_sb
);

  if (NIN < 2 || RADIX < 2) begin : g_bad
    $error("crc_xor_tree needs NIN >= 2 and RADIX >= 2");
  end

  // Number of nodes after l levels.
  function automatic int unsigned width_at(int unsigned l);
    int unsigned k = NIN;
    for (int unsigned i = 0; i < l; i++) k = (k + RADIX - 1) / RADIX;
    return k;
  endfunction

  crc_t            node [LEVELS][width_at(1)];
  logic [SB_W-1:0] sb   [LEVELS];

  for (genvar l = 0; l < LEVELS; l++) begin : g_lv
    localparam int unsigned WI = width_at(l);
    localparam int unsigned WO = width_at(l + 1);
    always_ff @(posedge clk) begin
      for (int unsigned o = 0; o < WO; o++) begin
        crc_t acc;
        acc = '0;
        for (int unsigned i = 0; i < RADIX; i++) begin
          if (o * RADIX + i < WI) begin
            if (l == 0) acc ^= in_x[o*RADIX+i];
            else        acc ^= node[(l == 0) ? 0 : l-1][o*RADIX+i];
          end
        end
        node[l][o] <= acc;
      end
      if (!rst_n) sb[l] <= '0;
      else        sb[l] <= (l == 0) ? in_sb : sb[(l == 0) ? 0 : l-1];
    end
  end

  assign out_x  = node[LEVELS-1][0];
  assign out_sb = sb[LEVELS-1];

endmodule
