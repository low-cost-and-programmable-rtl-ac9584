// crc_nonseg: the non-segmented CRC engine. It computes one CRC per frame
// over a DATA_W-bit bus and takes one word per clock. The polynomial can be
// reprogrammed at run time.
//
// Data path (one word per clock, no back-pressure):
//   region 1  crc_stride5_lut   ceil(n/5) stride-by-5 tables give the partial
//                               products of W * B                (1 clock)
//   region 2  crc_xor_tree      pipelined XOR tree sums them     (LEVELS clocks)
//   region 3  crc_state_update  C <- T^n * C + W * B, C <- INIT at a frame
//                               start                             (1 clock)
//   region 4  crc_go_back       undoes the padding zeros of the last word
//                               and applies XOROUT                (H clocks)
//   region 5  crc_lut_cfg       AXI4-Lite port that rewrites any table
// so out_crc follows the last word of its frame by LATENCY = LEVELS + H + 2
// clocks, H = log2(DATA_W/8).
//
// Frame format (non-segmented: at most one frame per word): a frame starts at
// byte 0 of a word with in_sop and ends with in_eop. In the last word the
// valid bytes are the low bytes and in_empty counts the padding bytes above
// them. The padding bytes must be zero (checked by an assertion), as the
// go-back stage assumes. A one-word frame has in_sop and in_eop together.
// Words without in_valid are ignored.
//
// Table identifiers on the configuration port: region 1 uses 0..NT1-1, the
// T^n product of region 3 uses NT1..NT1+6, and stage s of region 4 uses
// NT1+7+7s..NT1+13+7s, NT1 = ceil(DATA_W/5). Entry k of a table is the XOR
// of the matrix columns selected by the bits of k (see crc_pkg). INIT and
// XOROUT are fixed by parameters; only the table contents are programmable.
module crc_nonseg
  import crc_pkg::*;
#(
  parameter int unsigned DATA_W    = 4096,
  parameter crc_t        POLY      = POLY_CRC32,
  parameter crc_t        INIT      = INIT_CRC32,
  parameter crc_t        XOROUT    = XOROUT_CRC32,
  parameter int unsigned XOR_RADIX = 6,
  localparam int unsigned EMPTY_W  = $clog2(DATA_W / 8),
  localparam int unsigned NT1      = n_tables(DATA_W),
  localparam int unsigned NTM      = n_tables(CRC_W),
  localparam int unsigned N_TABLES = NT1 + NTM + NTM * EMPTY_W,
  localparam int unsigned LATENCY  = tree_levels(NT1, XOR_RADIX) + EMPTY_W + 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // frame input
  input  logic               in_valid,
  input  logic               in_sop,
  input  logic               in_eop,
  input  logic [EMPTY_W-1:0] in_empty,
  input  logic [DATA_W-1:0]  in_data,
  // CRC output, one per frame
  output logic               out_valid,
  output crc_t               out_crc,
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

  typedef struct packed {
    logic               valid;
    logic               sop;
    logic               eop;
    logic [EMPTY_W-1:0] empty;
  } word_info_t;

  cfg_wr_t    cfg;
  crc_t       md [1][NT1];
  word_info_t info_in, info_1, info_2;
  crc_t       wb;
  logic       st_valid;
  crc_t       st_crc;
  logic [EMPTY_W-1:0] st_empty;

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

  // Region 1
  crc_stride5_lut #(
    .DATA_W(DATA_W), .SEG_W(DATA_W), .POLY(POLY), .TBL_BASE(0)
  ) u_r1 (
    .clk, .cfg, .in_data, .md
  );

  assign info_in = '{valid: in_valid, sop: in_sop, eop: in_eop, empty: in_empty};

  always_ff @(posedge clk) begin
    if (!rst_n) info_1 <= '0;
    else        info_1 <= info_in;
  end

  // Region 2
  crc_xor_tree #(
    .NIN(NT1), .RADIX(XOR_RADIX), .SB_W($bits(word_info_t))
  ) u_r2 (
    .clk, .rst_n,
    .in_x  (md[0]),
    .in_sb (info_1),
    .out_x (wb),
    .out_sb(info_2)
  );

  // Region 3
  crc_state_update #(
    .DATA_W(DATA_W), .POLY(POLY), .INIT(INIT), .TBL_BASE(NT1)
  ) u_r3 (
    .clk, .rst_n, .cfg,
    .in_valid (info_2.valid),
    .in_sop   (info_2.sop),
    .in_eop   (info_2.eop),
    .in_empty (info_2.empty),
    .in_wb    (wb),
    .out_valid(st_valid),
    .out_crc  (st_crc),
    .out_empty(st_empty)
  );

  // Region 4
  crc_go_back #(
    .DATA_W(DATA_W), .POLY(POLY), .XOROUT(XOROUT), .TBL_BASE(NT1 + NTM)
  ) u_r4 (
    .clk, .rst_n, .cfg,
    .in_valid (st_valid),
    .in_crc   (st_crc),
    .in_qb    (st_empty),
    .out_valid(out_valid),
    .out_crc  (out_crc)
  );

  // The padding bytes of a frame's last word must be zero.
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_eop) begin
      for (int unsigned k = 0; k < DATA_W / 8; k++) begin
        if (k + 32'(in_empty) >= DATA_W / 8) begin
          a_pad_zero: assert (in_data[8*k +: 8] == 8'h00)
            else $error("non-zero padding byte %0d in last word", k);
        end
      end
    end
  end

endmodule
