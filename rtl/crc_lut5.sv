// crc_lut5: one stride-by-5 logical table with rewritable content.
//
// A 32-entry, CRC_W-bit wide table addressed by a 5-bit key. In an FPGA with
// 6-input LUTs used as dual 5-input LUTs this is CRC_W/2 LUTs: each output bit
// is an arbitrary 5-input function. Used with the content built by
// crc_pkg::tbl_from_cols it returns the XOR of the matrix columns selected by
// the key bits, which is how every matrix-vector product of the CRC engines
// is computed (stride-by-5).
//
// Content: INIT is the power-up content (the design's bitstream value). A
// write on the configuration port with cfg.tbl == TBL_ID replaces entry
// cfg.entry on the next clock edge; this stands for rewriting the LUT's
// INIT bits at run time. There is no reset of the content, as for an FPGA
// LUT.
//
// Timing: the read is combinational (key to y).
module crc_lut5
  import crc_pkg::*;
#(
  parameter int unsigned TBL_ID = 0,
  parameter tbl_t        INIT   = '{default: '0}
) (
  input  logic              clk,
  input  cfg_wr_t           cfg,
  input  logic [STRIDE-1:0] key,
  output crc_t              y
);

  crc_t mem [TBL_DEPTH] = INIT;

  always_ff @(posedge clk) begin
    if (cfg.we && cfg.tbl == TBL_ID_W'(TBL_ID)) mem[cfg.entry] <= cfg.data;
  end

  assign y = mem[key];

endmodule
