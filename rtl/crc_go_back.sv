// crc_go_back: region 4, the pipelined go-back stage that removes the
// padding zeros of a frame's last word from its CRC.
//
// The last word of a frame carries q padding zero bits after its p valid
// bits, so the state computed over the whole word is T^q times the wanted
// one. With q = 8 * (x_(h-1) 2^(h-1) + ... + x_0), h = log2(n/8), the
// wanted state is R_1^x_(h-1) * ... * R_h^x_0 * C with R_(i) fixed
// matrices T^(-8*2^(h-i)). Stage s (s = 0..h-1) holds R_(s+1) =
// T^(-8*2^(h-1-s)) as stride-by-5 tables and applies it when bit h-1-s of
// in_qb = q/8 is set; otherwise it passes the state on. Cost grows with
// log2(n), not n.
//
// The final XOR (XOROUT) is applied on the output of the last stage.
//
// Timing: h registered stages; out_* follows in_* by h clocks, one result
// per clock. Tables of stage s are TBL_BASE + 7*s .. TBL_BASE + 7*s + 6.
// Reset (active low, synchronous) clears the valid flags.
module crc_go_back
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W   = 4096,
  parameter crc_t        POLY     = POLY_CRC32,
  parameter crc_t        XOROUT   = XOROUT_CRC32,
  parameter int unsigned TBL_BASE = 0,
  localparam int unsigned H       = $clog2(DATA_W / 8),
  localparam int unsigned NT      = n_tables(CRC_W)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  cfg_wr_t      cfg,
  input  logic         in_valid,
  input  crc_t         in_crc,
  input  logic [H-1:0] in_qb,
  output logic         out_valid,
  output crc_t         out_crc
);

  if (DATA_W < 16 || (1 << H) != DATA_W / 8) begin : g_bad
    $error("crc_go_back needs DATA_W/8 to be a power of two of at least 2");
  end

  logic         v_q [H];
  crc_t         c_q [H];
  logic [H-1:0] q_q [H];

  for (genvar s = 0; s < H; s++) begin : g_st
    localparam int unsigned BIT = H - 1 - s;
    logic         v_in;
    crc_t         c_in, c_back;
    logic [H-1:0] q_in;

    if (s == 0) begin : g_first
      assign v_in = in_valid;
      assign c_in = in_crc;
      assign q_in = in_qb;
    end else begin : g_next
      assign v_in = v_q[s-1];
      assign c_in = c_q[s-1];
      assign q_in = q_q[s-1];
    end

    crc_mat_lut #(
      .M       (mat_pow(t_inv_mat(POLY), 8 << BIT)),
      .TBL_BASE(TBL_BASE + NT * s)
    ) u_r (
      .clk(clk),
      .cfg(cfg),
      .v  (c_in),
      .y  (c_back)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) v_q[s] <= 1'b0;
      else        v_q[s] <= v_in;
      c_q[s] <= q_in[BIT] ? c_back : c_in;
      q_q[s] <= q_in;
    end
  end

  assign out_valid = v_q[H-1];
  assign out_crc   = c_q[H-1] ^ XOROUT;

endmodule
