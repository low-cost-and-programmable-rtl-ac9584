// tb_crc_nonseg: self-checking test of the non-segmented CRC engine at a
// 128-bit bus.
//
// Random frames (1..80 bytes, with and without idle gaps, back to back) are
// sent; every CRC is compared with a bit-serial CRC-32 of the frame and the
// delay from the last word to the result is checked against the pipeline
// depth (1 + XOR-tree levels + 1 + log2(bus bytes)). Then every table is
// rewritten through AXI4-Lite with contents for CRC-32C, computed here bit by
// bit, and the frames are checked again against a serial CRC-32C. The known
// check value of CRC-32 ("123456789" -> CBF43926) is tested too.
module tb_crc_nonseg;
  import crc_ref_pkg::*;

  localparam int N    = 128;
  localparam int NB   = N / 8;
  localparam int H    = $clog2(NB);
  localparam int NT1  = (N + 4) / 5;
  localparam int NTAB = NT1 + 7 + 7 * H;
  localparam c32_t CRC32  = 32'hEDB8_8320;
  localparam c32_t CRC32C = 32'h82F6_3B78;

  function automatic int levels(int n, int r);
    int lv = 0;
    while (n > 1) begin n = (n + r - 1) / r; lv++; end
    return lv;
  endfunction
  localparam int LAT = 1 + levels(NT1, 6) + 1 + H;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           in_valid = 0, in_sop = 0, in_eop = 0;
  logic [H-1:0]   in_empty = '0;
  logic [N-1:0]   in_data = '0;
  logic           out_valid;
  logic [31:0]    out_crc;
  logic [3:0]     awaddr = '0, araddr = '0;
  logic           awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0]    wdata = '0;
  logic           awready, wready, bvalid, arready, rvalid;
  logic [1:0]     bresp, rresp;
  logic [31:0]    rdata;

  crc_nonseg #(.DATA_W(N)) dut (
    .clk, .rst_n, .in_valid, .in_sop, .in_eop, .in_empty, .in_data,
    .out_valid, .out_crc,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_araddr(araddr), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rvalid(rvalid), .s_axi_rready(rready)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  c32_t exp_crc[$];
  longint exp_cyc[$];
  int n_single = 0, n_multi = 0, n_pad = 0, n_b2b = 0, n_gap = 0;
  int n_reprog = 0;
  logic [H-1:0] empty_bits_seen = '0;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid) begin
      checks++;
      if (exp_crc.size() == 0) begin
        failures++;
        $display("unexpected result %08x", out_crc);
      end else begin
        c32_t e;
        longint c0;
        e  = exp_crc.pop_front();
        c0 = exp_cyc.pop_front();
        if (out_crc !== e) begin
          failures++;
          $display("CRC mismatch: got %08x expected %08x", out_crc, e);
        end
        checks++;
        if (cyc - c0 != longint'(LAT)) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - c0, LAT);
        end
      end
    end
  end

  task automatic send_frame(byte unsigned d[$], c32_t poly, bit gap);
    int nw = (d.size() + NB - 1) / NB;
    exp_crc.push_back(crc_bytes(d, poly, 32'hFFFF_FFFF, 32'hFFFF_FFFF));
    if (nw == 1) n_single++; else n_multi++;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      in_valid = 1;
      in_sop   = (w == 0);
      in_eop   = (w == nw - 1);
      in_empty = (w == nw - 1) ? H'(nw * NB - d.size()) : '0;
      for (int k = 0; k < NB; k++)
        in_data[8*k +: 8] = (w * NB + k < d.size()) ? d[w*NB+k] : 8'h00;
      if (in_eop) begin
        exp_cyc.push_back(cyc);
        if (in_empty != 0) n_pad++;
        empty_bits_seen |= in_empty;
      end
    end
    if (gap) begin
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
      in_data  = {N/32{$urandom()}};   // garbage on idle cycles
      n_gap++;
    end else n_b2b++;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0; in_sop = 0; in_eop = 0;
  endtask

  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic axi_read(logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    d = rdata;
  endtask

  // Write every table of the engine with the contents for polynomial poly.
  task automatic reprogram(c32_t poly);
    c32_t cols[$];
    axi_write(4'h0, 0);
    axi_write(4'h4, 0);
    w_cols(N, poly, cols);
    for (int t = 0; t < NT1; t++)
      for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(cols, 5 * t, k));
    t_cols(N, poly, cols);
    for (int t = 0; t < 7; t++)
      for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(cols, 5 * t, k));
    for (int s = 0; s < H; s++) begin
      t_cols(-(8 << (H - 1 - s)), poly, cols);
      for (int t = 0; t < 7; t++)
        for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(cols, 5 * t, k));
    end
    n_reprog++;
  endtask

  task automatic run_random(int frames, c32_t poly);
    for (int f = 0; f < frames; f++) begin
      byte unsigned d[$];
      int len = 1 + $urandom_range(0, 79);
      for (int i = 0; i < len; i++) d.push_back(8'($urandom()));
      send_frame(d, poly, $urandom_range(0, 2) == 0);
    end
    idle();
    repeat (LAT + 4) @(negedge clk);
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned chk[$];
    logic [31:0] info;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // CRC-32 check value
    chk = {"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    send_frame(chk, CRC32, 1);
    idle();
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (crc_bytes(chk, CRC32, 32'hFFFF_FFFF, 32'hFFFF_FFFF) != 32'hCBF4_3926) begin
      failures++;
      $display("reference model broken");
    end
    run_random(150, CRC32);
    // register readback
    axi_read(4'hC, info);
    checks++;
    if (info != NTAB) begin failures++; $display("INFO %0d", info); end
    reprogram(CRC32C);
    axi_read(4'h0, info);
    checks++;
    if (info != NTAB) begin failures++; $display("TBL after stream %0d", info); end
    chk = {"1", "2", "3", "4", "5", "6", "7", "8", "9"};
    send_frame(chk, CRC32C, 1);
    run_random(150, CRC32C);
    reprogram(CRC32);
    run_random(50, CRC32);
    // every mechanism must have happened
    checks++;
    if (n_single == 0 || n_multi == 0 || n_pad == 0 || n_b2b == 0 || n_gap == 0 ||
        n_reprog < 2 || empty_bits_seen != '1 || exp_crc.size() != 0) begin
      failures++;
      $display("coverage: single %0d multi %0d pad %0d b2b %0d gap %0d reprog %0d bits %b left %0d",
               n_single, n_multi, n_pad, n_b2b, n_gap, n_reprog, empty_bits_seen, exp_crc.size());
    end
    $display("single-word %0d multi-word %0d padded %0d back-to-back %0d gaps %0d reprogrammed %0d",
             n_single, n_multi, n_pad, n_b2b, n_gap, n_reprog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
