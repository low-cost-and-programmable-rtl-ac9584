// crc_state_update: region 3 of the non-segmented engine, the CRC state
// register C and its update C <- T^n * C + W * B.
//
// Once per valid word the state is advanced by n = DATA_W bits: T^n * C is
// computed with stride-by-5 tables (crc_mat_lut) and W * B arrives from the
// XOR tree. At the first word of a frame (in_sop) the old state is replaced
// by the initial value INIT before the product, so a frame can start in the
// word right after the previous one ended. The loop through the tables and
// one XOR is the only feedback path of the engine.
//
// When the word is the last of a frame (in_eop), the next clock presents
// the state C^(p+q+k) together with the frame's count of padding bytes
// (in_empty, q/8) on out_*; region 4 then removes the padding.
//
// Timing: out_valid, out_crc and out_empty are registered, one clock after
// the in_* word. Reset (active low, synchronous) clears the valid flag and
// loads INIT into the state. INIT and the in_sop replacement are this
// design's choices for where the initial value enters.
module crc_state_update
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W   = 4096,
  parameter crc_t        POLY     = POLY_CRC32,
  parameter crc_t        INIT     = INIT_CRC32,
  parameter int unsigned TBL_BASE = 0,
  localparam int unsigned EMPTY_W = $clog2(DATA_W / 8)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cfg_wr_t            cfg,
  input  logic               in_valid,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [EMPTY_W-1:0] in_empty,
  input  crc_t               in_wb,
  output logic               out_valid,
  output crc_t               out_crc,
  output logic [EMPTY_W-1:0] out_empty
);

  crc_t c_q, cur, tn_c;

  assign cur = in_sop ? INIT : c_q;

  crc_mat_lut #(
    .M       (mat_pow(t_mat(POLY), DATA_W)),
    .TBL_BASE(TBL_BASE)
  ) u_tn (
    .clk(clk),
    .cfg(cfg),
    .v  (cur),
    .y  (tn_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_q       <= INIT;
      out_valid <= 1'b0;
      out_empty <= '0;
    end else begin
      out_valid <= in_valid && in_eop;
      if (in_valid) begin
        c_q       <= tn_c ^ in_wb;
        out_empty <= in_empty;
      end
    end
  end

  assign out_crc = c_q;

endmodule
