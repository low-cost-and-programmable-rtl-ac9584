// crc_lut_cfg: region 5, the AXI4-Lite port through which the logical tables
// of a CRC engine are rewritten at run time, so that the engine can be given
// a new polynomial without rebuilding it.
//
// On the FPGA this job is done by the vendor's internal configuration access
// port, which rewrites the INIT bits of the LUTs in place. That port is
// device specific; this module gives the same effect in portable logic: each
// table entry is written through the cfg bus that every crc_lut5 listens to.
// Host software computes the new contents (see crc_pkg for the formulas) and
// writes them here; the engine should be idle while that happens.
//
// Register map (32-bit registers, byte addresses):
//   0x0 TBL    R/W  table identifier of the next write
//   0x4 ENTRY  R/W  entry (0..31) of the next write
//   0x8 DATA   W    writes the CRC_W-bit value to (TBL, ENTRY), then
//                   ENTRY increments and wraps into TBL + 1, so a whole
//                   table space can be streamed with consecutive DATA writes
//   0xC INFO   R    number of tables of the engine (N_TABLES)
// Other addresses answer OKAY and read as zero. WSTRB is ignored: every
// write is a full word.
//
// Timing: one write and one read can be in flight. A write is taken when
// AWVALID and WVALID are both high and no response is pending; the response
// follows one clock later, and so does the cfg write pulse. A read answers
// one clock after the address. Reset is active low and synchronous; cfg.we
// is also masked by rst_n directly, so no table is written while in reset.
module crc_lut_cfg
  import crc_pkg::*;
#(
  parameter int unsigned N_TABLES = 890,
  parameter int unsigned ADDR_W   = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // table write bus to the engine
  output cfg_wr_t           cfg
);

  typedef enum logic [1:0] {REG_TBL = 2'd0, REG_ENTRY = 2'd1,
                            REG_DATA = 2'd2, REG_INFO = 2'd3} reg_e;

  logic [TBL_ID_W-1:0] tbl_q;
  logic [STRIDE-1:0]   entry_q;
  cfg_wr_t             cfg_q;
  logic                wr_fire, rd_fire;
  reg_e                wsel, rsel;

  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign wsel          = reg_e'(s_axi_awaddr[3:2]);

  // Registers are word aligned: the two low address bits are not decoded.
  logic unused_addr;
  assign unused_addr = ^{s_axi_awaddr[1:0], s_axi_araddr[1:0]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tbl_q        <= '0;
      entry_q      <= '0;
      s_axi_bvalid <= 1'b0;
      cfg_q        <= '0;
    end else begin
      cfg_q.we <= 1'b0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        unique case (wsel)
          REG_TBL:   tbl_q   <= s_axi_wdata[TBL_ID_W-1:0];
          REG_ENTRY: entry_q <= s_axi_wdata[STRIDE-1:0];
          REG_DATA: begin
            cfg_q.we    <= 1'b1;
            cfg_q.tbl   <= tbl_q;
            cfg_q.entry <= entry_q;
            cfg_q.data  <= crc_t'(s_axi_wdata);
            entry_q   <= entry_q + 1'b1;
            if (&entry_q) tbl_q <= tbl_q + 1'b1;
          end
          REG_INFO: ;
        endcase
      end
    end
  end

  assign s_axi_bresp = 2'b00;

  // The write pulse is held off during reset, so that the register's value
  // before the first reset clock can never write a table.
  always_comb begin
    cfg    = cfg_q;
    cfg.we = cfg_q.we && rst_n;
  end

  assign rd_fire       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_fire;
  assign rsel          = reg_e'(s_axi_araddr[3:2]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else begin
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
      if (rd_fire) begin
        s_axi_rvalid <= 1'b1;
        unique case (rsel)
          REG_TBL:   s_axi_rdata <= 32'(tbl_q);
          REG_ENTRY: s_axi_rdata <= 32'(entry_q);
          REG_DATA:  s_axi_rdata <= '0;
          REG_INFO:  s_axi_rdata <= 32'(N_TABLES);
        endcase
      end
    end
  end

  assign s_axi_rresp = 2'b00;

  // The strobes are not used: all registers take full-word writes.
  logic unused_strb;
  assign unused_strb = ^s_axi_wstrb;

  // AXI rules: a response, once valid, stays (with its data) until it is
  // accepted; writes only address tables that exist.
  logic        b_wait_q, r_wait_q;
  logic [31:0] rdata_q;
  always_ff @(posedge clk) begin
    b_wait_q <= rst_n && s_axi_bvalid && !s_axi_bready;
    r_wait_q <= rst_n && s_axi_rvalid && !s_axi_rready;
    rdata_q  <= s_axi_rdata;
    if (rst_n) begin
      a_bvalid_hold: assert (!b_wait_q || s_axi_bvalid)
        else $error("BVALID dropped before BREADY");
      a_rvalid_hold: assert (!r_wait_q || (s_axi_rvalid && s_axi_rdata == rdata_q))
        else $error("RVALID or RDATA changed before RREADY");
      a_tbl_range: assert (!cfg.we || int'(cfg.tbl) < N_TABLES)
        else $error("table write outside the engine's tables");
    end
  end

endmodule
