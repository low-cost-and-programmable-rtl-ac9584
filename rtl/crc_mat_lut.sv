// crc_mat_lut: product of a CRC_W x CRC_W matrix with the CRC state, done
// with stride-by-5 logical tables.
//
// The state is cut into ceil(CRC_W/5) keys of 5 bits; key t addresses a
// crc_lut5 holding the XOR combinations of matrix columns 5t..5t+4, and the
// table outputs are XORed. Regions 3 (T^n * C) and 4 (T^(-8*2^i) * C) of the
// CRC engines use it. Default content comes from the matrix M; tables are
// TBL_BASE .. TBL_BASE+NT-1 on the configuration port.
//
// Timing: combinational from v to y.
module crc_mat_lut
  import crc_pkg::*;
#(
  parameter mat_t        M        = mat_identity(),
  parameter int unsigned TBL_BASE = 0,
  localparam int unsigned NT      = n_tables(CRC_W)
) (
  input  logic    clk,
  input  cfg_wr_t cfg,
  input  crc_t    v,
  output crc_t    y
);

  crc_t part [NT];

  for (genvar t = 0; t < NT; t++) begin : g_tbl
    localparam int unsigned LO = STRIDE * t;
    localparam int unsigned KW = (CRC_W - LO < STRIDE) ? CRC_W - LO : STRIDE;
    logic [STRIDE-1:0] key;
    assign key = STRIDE'(v[LO +: KW]);
    crc_lut5 #(
      .TBL_ID(TBL_BASE + t),
      .INIT  (tbl_from_mat(M, t))
    ) u_tbl (
      .clk(clk),
      .cfg(cfg),
      .key(key),
      .y  (part[t])
    );
  end

  always_comb begin
    y = '0;
    for (int t = 0; t < NT; t++) y ^= part[t];
  end

endmodule
