// crc_top: both stride-by-5 CRC engines, side by side.
//
//  * ns_*: the non-segmented engine (crc_nonseg), one frame per word,
//    NS_DATA_W bits per clock.
//  * sa_*: the segmented engine (crc_seg), several frames per word in
//    SA_SEG_W-bit segments, SA_DATA_W bits per clock.
// The two engines are independent: each has its own frame interface, its own
// CRC outputs and its own AXI4-Lite port for rewriting its tables (and so
// its polynomial). Both default to a 4096-bit bus and, after power-up, to
// IEEE 802.3 CRC-32. See crc_nonseg and crc_seg for the formats and timing.
module crc_top
  import crc_pkg::*;
#(
  parameter int unsigned NS_DATA_W  = 4096,
  parameter int unsigned SA_DATA_W  = 4096,
  parameter int unsigned SA_SEG_W   = 64,
  localparam int unsigned NS_EW     = $clog2(NS_DATA_W / 8),
  localparam int unsigned SA_S      = SA_DATA_W / SA_SEG_W,
  localparam int unsigned SA_EW     = $clog2(SA_SEG_W / 8),
  localparam int unsigned SA_K      = SA_DATA_W / 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // non-segmented engine
  input  logic                 ns_in_valid,
  input  logic                 ns_in_sop,
  input  logic                 ns_in_eop,
  input  logic [NS_EW-1:0]     ns_in_empty,
  input  logic [NS_DATA_W-1:0] ns_in_data,
  output logic                 ns_out_valid,
  output crc_t                 ns_out_crc,
  input  logic [3:0]           ns_axi_awaddr,
  input  logic                 ns_axi_awvalid,
  output logic                 ns_axi_awready,
  input  logic [31:0]          ns_axi_wdata,
  input  logic [3:0]           ns_axi_wstrb,
  input  logic                 ns_axi_wvalid,
  output logic                 ns_axi_wready,
  output logic [1:0]           ns_axi_bresp,
  output logic                 ns_axi_bvalid,
  input  logic                 ns_axi_bready,
  input  logic [3:0]           ns_axi_araddr,
  input  logic                 ns_axi_arvalid,
  output logic                 ns_axi_arready,
  output logic [31:0]          ns_axi_rdata,
  output logic [1:0]           ns_axi_rresp,
  output logic                 ns_axi_rvalid,
  input  logic                 ns_axi_rready,
  // segmented engine
  input  logic                 sa_in_valid,
  input  logic [SA_S-1:0]      sa_seg_valid,
  input  logic [SA_S-1:0]      sa_seg_sop,
  input  logic [SA_S-1:0]      sa_seg_eop,
  input  logic [SA_EW-1:0]     sa_seg_empty [SA_S],
  input  logic [SA_DATA_W-1:0] sa_in_data,
  output logic [SA_K-1:0]      sa_out_valid,
  output crc_t                 sa_out_crc [SA_K],
  output logic                 sa_frame_err,
  input  logic [3:0]           sa_axi_awaddr,
  input  logic                 sa_axi_awvalid,
  output logic                 sa_axi_awready,
  input  logic [31:0]          sa_axi_wdata,
  input  logic [3:0]           sa_axi_wstrb,
  input  logic                 sa_axi_wvalid,
  output logic                 sa_axi_wready,
  output logic [1:0]           sa_axi_bresp,
  output logic                 sa_axi_bvalid,
  input  logic                 sa_axi_bready,
  input  logic [3:0]           sa_axi_araddr,
  input  logic                 sa_axi_arvalid,
  output logic                 sa_axi_arready,
  output logic [31:0]          sa_axi_rdata,
  output logic [1:0]           sa_axi_rresp,
  output logic                 sa_axi_rvalid,
  input  logic                 sa_axi_rready
);

  crc_nonseg #(.DATA_W(NS_DATA_W)) u_nonseg (
    .clk, .rst_n,
    .in_valid(ns_in_valid), .in_sop(ns_in_sop), .in_eop(ns_in_eop),
    .in_empty(ns_in_empty), .in_data(ns_in_data),
    .out_valid(ns_out_valid), .out_crc(ns_out_crc),
    .s_axi_awaddr(ns_axi_awaddr), .s_axi_awvalid(ns_axi_awvalid),
    .s_axi_awready(ns_axi_awready), .s_axi_wdata(ns_axi_wdata),
    .s_axi_wstrb(ns_axi_wstrb), .s_axi_wvalid(ns_axi_wvalid),
    .s_axi_wready(ns_axi_wready), .s_axi_bresp(ns_axi_bresp),
    .s_axi_bvalid(ns_axi_bvalid), .s_axi_bready(ns_axi_bready),
    .s_axi_araddr(ns_axi_araddr), .s_axi_arvalid(ns_axi_arvalid),
    .s_axi_arready(ns_axi_arready), .s_axi_rdata(ns_axi_rdata),
    .s_axi_rresp(ns_axi_rresp), .s_axi_rvalid(ns_axi_rvalid),
    .s_axi_rready(ns_axi_rready)
  );

  crc_seg #(.DATA_W(SA_DATA_W), .SEG_W(SA_SEG_W)) u_seg (
    .clk, .rst_n,
    .in_valid(sa_in_valid), .seg_valid(sa_seg_valid), .seg_sop(sa_seg_sop),
    .seg_eop(sa_seg_eop), .seg_empty(sa_seg_empty), .in_data(sa_in_data),
    .out_valid(sa_out_valid), .out_crc(sa_out_crc), .frame_err(sa_frame_err),
    .s_axi_awaddr(sa_axi_awaddr), .s_axi_awvalid(sa_axi_awvalid),
    .s_axi_awready(sa_axi_awready), .s_axi_wdata(sa_axi_wdata),
    .s_axi_wstrb(sa_axi_wstrb), .s_axi_wvalid(sa_axi_wvalid),
    .s_axi_wready(sa_axi_wready), .s_axi_bresp(sa_axi_bresp),
    .s_axi_bvalid(sa_axi_bvalid), .s_axi_bready(sa_axi_bready),
    .s_axi_araddr(sa_axi_araddr), .s_axi_arvalid(sa_axi_arvalid),
    .s_axi_arready(sa_axi_arready), .s_axi_rdata(sa_axi_rdata),
    .s_axi_rresp(sa_axi_rresp), .s_axi_rvalid(sa_axi_rvalid),
    .s_axi_rready(sa_axi_rready)
  );

endmodule
