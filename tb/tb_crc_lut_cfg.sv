// tb_crc_lut_cfg: checks the AXI4-Lite table port: TBL and ENTRY read back
// what was written, INFO reads the table count, each DATA write produces one
// cfg write with the current (TBL, ENTRY) and then advances ENTRY, carrying
// into TBL after entry 31; a held-off BREADY keeps BVALID up and blocks the
// next write; address and data may arrive on different clocks.
module tb_crc_lut_cfg;
  import crc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0] wdata = '0, rdata;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  cfg_wr_t     cfg;
  int checks = 0, failures = 0;
  cfg_wr_t     seen [$];

  crc_lut_cfg #(.N_TABLES(100)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready), .cfg
  );

  always @(posedge clk) if (cfg.we) seen.push_back(cfg);

  task automatic wr(logic [3:0] a, logic [31:0] d, bit split);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d;
    if (split) begin
      @(negedge clk);
      checks++;
      if (awready) begin failures++; $display("address taken without data"); end
    end
    wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    checks++;
    if (bresp != 2'b00) failures++;
  endtask

  task automatic rd(logic [3:0] a, logic [31:0] e);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    checks++;
    if (rdata !== e) begin failures++; $display("read %0h: %08x expected %08x", a, rdata, e); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(4'hC, 100);
    wr(4'h0, 7, 0);
    wr(4'h4, 30, 1);
    rd(4'h0, 7);
    rd(4'h4, 30);
    for (int i = 0; i < 4; i++) wr(4'h8, 32'hA000_0000 + i, i[0]);
    repeat (2) @(negedge clk);
    checks++;
    if (seen.size() != 4) begin failures++; $display("%0d cfg writes", seen.size()); end
    for (int i = 0; i < 4 && i < seen.size(); i++) begin
      checks++;
      if (seen[i].tbl != 12'(7 + (30 + i) / 32) || seen[i].entry != 5'((30 + i) % 32) ||
          seen[i].data != 32'hA000_0000 + i) begin
        failures++;
        $display("write %0d: tbl %0d entry %0d data %08x", i, seen[i].tbl, seen[i].entry, seen[i].data);
      end
    end
    rd(4'h0, 8);
    rd(4'h4, 2);
    // BREADY held low: the response stays and no second write is taken
    bready = 0;
    @(negedge clk);
    awaddr = 4'h0; awvalid = 1; wdata = 3; wvalid = 1;
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    @(negedge clk);
    awaddr = 4'h0; awvalid = 1; wdata = 9; wvalid = 1;
    repeat (3) begin
      @(negedge clk);
      checks++;
      if (!bvalid || awready) begin failures++; $display("response not held"); end
    end
    bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    @(negedge clk);
    rd(4'h0, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
