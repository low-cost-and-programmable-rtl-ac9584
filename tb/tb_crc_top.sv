// tb_crc_top: end-to-end test of both engines at their default size (4096-bit
// buses, 64-bit segments, CRC-32 after power-up), no parameter overridden.
//
// Non-segmented engine: random frames of 1..1600 bytes, back to back and with
// gaps; every CRC is checked against a bit-serial CRC-32, and its delay
// against the pipeline depth (1 + 4 XOR-tree levels + 1 + 9 go-back stages).
// Segmented engine: random frames of 64..256 bytes in 64-bit segments, with
// idle segments and idle words; then a burst of back-to-back 65-byte frames,
// whose bus efficiency must be 65/72. Each engine is then given CRC-32C by
// rewriting all its tables over its AXI4-Lite port (both at once) and checked
// again. Counted mechanisms, each of which must occur: single- and multi-word
// frames, padding removal with every go-back stage used, up to eight frames
// ending in one word, frames crossing words, idle words inside a frame, and
// the polynomial switch.
module tb_crc_top;
  import crc_ref_pkg::*;

  localparam int N    = 4096;
  localparam int NB   = N / 8;
  localparam int H    = 9;
  localparam int SEG  = 64;
  localparam int SB   = 8;
  localparam int S    = 64;
  localparam int K    = 8;
  localparam int NT1  = 820;
  localparam int NTS  = 13;
  localparam int NIA  = 2;
  localparam int LAT_NS = 1 + 4 + 1 + H;   // 820 -> 137 -> 23 -> 4 -> 1
  localparam int LAT_SA = 1 + 2 + 3 + 1 + H;  // 13 -> 3 -> 1, 64 -> 11 -> 2 -> 1
  localparam c32_t CRC32  = 32'hEDB8_8320;
  localparam c32_t CRC32C = 32'h82F6_3B78;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // non-segmented engine
  logic           ns_in_valid = 0, ns_in_sop = 0, ns_in_eop = 0;
  logic [H-1:0]   ns_in_empty = '0;
  logic [N-1:0]   ns_in_data = '0;
  logic           ns_out_valid;
  logic [31:0]    ns_out_crc;
  // segmented engine
  logic           sa_in_valid = 0;
  logic [S-1:0]   sa_seg_valid = '0, sa_seg_sop = '0, sa_seg_eop = '0;
  logic [2:0]     sa_seg_empty [S];
  logic [N-1:0]   sa_in_data = '0;
  logic [K-1:0]   sa_out_valid;
  logic [31:0]    sa_out_crc [K];
  logic           sa_frame_err;
  // AXI4-Lite masters, [0] non-segmented, [1] segmented
  logic [3:0]     awaddr [2], araddr [2];
  logic           awvalid [2], wvalid [2], arvalid [2];
  logic [31:0]    wdata [2];
  logic           awready [2], wready [2], bvalid [2], arready [2], rvalid [2];
  logic [1:0]     bresp [2], rresp [2];
  logic [31:0]    rdata [2];

  crc_top dut (
    .clk, .rst_n,
    .ns_in_valid, .ns_in_sop, .ns_in_eop, .ns_in_empty, .ns_in_data,
    .ns_out_valid, .ns_out_crc,
    .ns_axi_awaddr(awaddr[0]), .ns_axi_awvalid(awvalid[0]), .ns_axi_awready(awready[0]),
    .ns_axi_wdata(wdata[0]), .ns_axi_wstrb(4'hF), .ns_axi_wvalid(wvalid[0]),
    .ns_axi_wready(wready[0]), .ns_axi_bresp(bresp[0]), .ns_axi_bvalid(bvalid[0]),
    .ns_axi_bready(1'b1), .ns_axi_araddr(araddr[0]), .ns_axi_arvalid(arvalid[0]),
    .ns_axi_arready(arready[0]), .ns_axi_rdata(rdata[0]), .ns_axi_rresp(rresp[0]),
    .ns_axi_rvalid(rvalid[0]), .ns_axi_rready(1'b1),
    .sa_in_valid, .sa_seg_valid, .sa_seg_sop, .sa_seg_eop, .sa_seg_empty,
    .sa_in_data, .sa_out_valid, .sa_out_crc, .sa_frame_err,
    .sa_axi_awaddr(awaddr[1]), .sa_axi_awvalid(awvalid[1]), .sa_axi_awready(awready[1]),
    .sa_axi_wdata(wdata[1]), .sa_axi_wstrb(4'hF), .sa_axi_wvalid(wvalid[1]),
    .sa_axi_wready(wready[1]), .sa_axi_bresp(bresp[1]), .sa_axi_bvalid(bvalid[1]),
    .sa_axi_bready(1'b1), .sa_axi_araddr(araddr[1]), .sa_axi_arvalid(arvalid[1]),
    .sa_axi_arready(arready[1]), .sa_axi_rdata(rdata[1]), .sa_axi_rresp(rresp[1]),
    .sa_axi_rvalid(rvalid[1]), .sa_axi_rready(1'b1)
  );

  int checks = 0, failures = 0;
  longint cyc = 0;
  c32_t ns_exp[$], sa_exp[$];
  longint ns_cyc[$], sa_cyc[$];
  int ns_single = 0, ns_multi = 0, ns_pad = 0, ns_gap = 0, ns_b2b = 0;
  logic [H-1:0] ns_bits = '0, sa_bits = '0;
  int sa_max_ends = 0, sa_cross = 0, sa_idle_mid = 0, sa_idle_seg = 0;
  int n_reprog = 0;

  // ---------------------------------------------------------------- checking
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ns_out_valid) begin
      checks++;
      if (ns_exp.size() == 0) begin
        failures++;
        $display("ns: unexpected result");
      end else begin
        c32_t e;
        longint c0;
        e  = ns_exp.pop_front();
        c0 = ns_cyc.pop_front();
        if (ns_out_crc !== e || cyc - c0 != longint'(LAT_NS)) begin
          failures++;
          $display("ns: %08x after %0d, expected %08x after %0d", ns_out_crc, cyc - c0, e, LAT_NS);
        end
      end
    end
    for (int f = 0; f < K; f++) begin
      if (sa_out_valid[f]) begin
        checks++;
        if (sa_exp.size() == 0) begin
          failures++;
          $display("sa: unexpected result");
        end else begin
          c32_t e;
          longint c0;
          e  = sa_exp.pop_front();
          c0 = sa_cyc.pop_front();
          if (sa_out_crc[f] !== e || cyc - c0 != longint'(LAT_SA)) begin
            failures++;
            $display("sa slot %0d: %08x after %0d, expected %08x after %0d",
                     f, sa_out_crc[f], cyc - c0, e, LAT_SA);
          end
        end
      end
    end
    if (sa_frame_err) begin failures++; $display("sa: frame_err"); end
  end

  // ------------------------------------------------------- non-segmented side
  task automatic ns_frame(int len, c32_t poly, bit gap);
    byte unsigned d[$];
    int nw = (len + NB - 1) / NB;
    for (int i = 0; i < len; i++) d.push_back(8'($urandom()));
    ns_exp.push_back(crc_bytes(d, poly, 32'hFFFF_FFFF, 32'hFFFF_FFFF));
    if (nw == 1) ns_single++; else ns_multi++;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      ns_in_valid = 1;
      ns_in_sop   = (w == 0);
      ns_in_eop   = (w == nw - 1);
      ns_in_empty = (w == nw - 1) ? H'(nw * NB - len) : '0;
      for (int k = 0; k < NB; k++)
        ns_in_data[8*k +: 8] = (w * NB + k < len) ? d[w*NB+k] : 8'h00;
      if (ns_in_eop) begin
        ns_cyc.push_back(cyc);
        if (ns_in_empty != 0) ns_pad++;
        ns_bits |= ns_in_empty;
      end
    end
    if (gap) begin
      @(negedge clk);
      ns_in_valid = 0; ns_in_sop = 0; ns_in_eop = 0;
      ns_gap++;
    end else ns_b2b++;
  endtask

  task automatic ns_run(int frames, c32_t poly);
    for (int f = 0; f < frames; f++)
      ns_frame(1 + $urandom_range(0, 1599), poly, $urandom_range(0, 2) == 0);
    @(negedge clk);
    ns_in_valid = 0; ns_in_sop = 0; ns_in_eop = 0;
    repeat (LAT_NS + 4) @(negedge clk);
  endtask

  // ----------------------------------------------------------- segmented side
  typedef struct {
    bit          v, sop, eop;
    int          empty;
    byte unsigned d[8];
    int          frame;
  } seg_t;
  seg_t stream[$];
  c32_t frame_crc[$];

  task automatic sa_add(int len, c32_t poly, int idle_before);
    byte unsigned d[$];
    int nseg = (len + SB - 1) / SB;
    for (int i = 0; i < len; i++) d.push_back(8'($urandom()));
    frame_crc.push_back(crc_bytes(d, poly, 32'hFFFF_FFFF, 32'hFFFF_FFFF));
    for (int i = 0; i < idle_before; i++) begin
      seg_t z;
      z.v = 0; z.sop = 0; z.eop = 0; z.empty = 0; z.frame = -1;
      foreach (z.d[b]) z.d[b] = 8'($urandom());
      stream.push_back(z);
      sa_idle_seg++;
    end
    for (int s = 0; s < nseg; s++) begin
      seg_t g;
      g.v = 1; g.sop = (s == 0); g.eop = (s == nseg - 1);
      g.empty = g.eop ? nseg * SB - len : 0;
      g.frame = frame_crc.size() - 1;
      for (int b = 0; b < SB; b++) g.d[b] = (s * SB + b < len) ? d[s*SB+b] : 8'h00;
      stream.push_back(g);
    end
  endtask

  task automatic sa_send(bit idle_words, output int words);
    int open_frame = -1;
    words = 0;
    while (stream.size() != 0) begin
      int ends = 0;
      @(negedge clk);
      if (idle_words && open_frame >= 0 && $urandom_range(0, 5) == 0) begin
        sa_in_valid = 0;
        sa_idle_mid++;
        continue;
      end
      sa_in_valid = 1;
      words++;
      for (int s = 0; s < S; s++) begin
        seg_t g;
        if (stream.size() != 0) g = stream.pop_front();
        else begin
          g.v = 0; g.sop = 0; g.eop = 0; g.empty = 0; g.frame = -1;
          foreach (g.d[b]) g.d[b] = 8'h00;
        end
        sa_seg_valid[s] = g.v;
        sa_seg_sop[s]   = g.sop;
        sa_seg_eop[s]   = g.eop;
        sa_seg_empty[s] = 3'(g.empty);
        for (int b = 0; b < SB; b++) sa_in_data[SEG*s + 8*b +: 8] = g.d[b];
        if (g.v && g.sop) open_frame = g.frame;
        if (g.v && g.eop) begin
          sa_exp.push_back(frame_crc[g.frame]);
          sa_cyc.push_back(cyc);
          sa_bits |= H'((S - 1 - s) * SB + g.empty);
          open_frame = -1;
          ends++;
        end
      end
      if (open_frame >= 0 && sa_seg_valid[S-1]) sa_cross++;
      if (ends > sa_max_ends) sa_max_ends = ends;
    end
    @(negedge clk);
    sa_in_valid = 0;
    repeat (LAT_SA + 4) @(negedge clk);
  endtask

  task automatic sa_run(int frames, c32_t poly);
    int words;
    for (int f = 0; f < frames; f++) begin
      int len  = ($urandom_range(0, 2) == 0) ? 64 : 64 + $urandom_range(0, 192);
      int idle = ($urandom_range(0, 5) == 0) ? $urandom_range(1, 3) : 0;
      sa_add(len, poly, idle);
    end
    sa_send(1, words);
  endtask

  // ------------------------------------------------------------- programming
  task automatic axi_write(int m, logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr[m] = a; wdata[m] = d; awvalid[m] = 1; wvalid[m] = 1;
    do @(posedge clk); while (!(awready[m] && wready[m]));
    @(negedge clk);
    awvalid[m] = 0; wvalid[m] = 0;
    while (!bvalid[m]) @(negedge clk);
  endtask

  task automatic axi_read(int m, logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr[m] = a; arvalid[m] = 1;
    do @(posedge clk); while (!arready[m]);
    @(negedge clk);
    arvalid[m] = 0;
    while (!rvalid[m]) @(negedge clk);
    d = rdata[m];
  endtask

  task automatic write_tables(int m, c32_t cols[$], int ntab);
    for (int t = 0; t < ntab; t++)
      for (int k = 0; k < 32; k++) axi_write(m, 4'h8, entry_of(cols, 5 * t, k));
  endtask

  task automatic write_goback(int m, c32_t poly);
    c32_t cols[$];
    for (int s = 0; s < H; s++) begin
      t_cols(-(8 << (H - 1 - s)), poly, cols);
      write_tables(m, cols, 7);
    end
  endtask

  task automatic ns_program(c32_t poly);
    c32_t cols[$];
    axi_write(0, 4'h0, 0);
    axi_write(0, 4'h4, 0);
    w_cols(N, poly, cols);
    write_tables(0, cols, NT1);
    t_cols(N, poly, cols);
    write_tables(0, cols, 7);
    write_goback(0, poly);
  endtask

  task automatic sa_program(c32_t poly);
    c32_t cols[$], wc[$], sc[$];
    axi_write(1, 4'h0, 0);
    axi_write(1, 4'h4, 0);
    w_cols(N, poly, wc);
    for (int s = 0; s < S; s++) begin
      sc = wc[SEG*s : SEG*s + SEG - 1];
      write_tables(1, sc, NTS);
    end
    t_cols(N, poly, cols);
    write_tables(1, cols, 7);
    for (int j = 0; j < NIA; j++)
      for (int e = 0; e < 32; e++) begin
        int a = 32 * j + e;
        c32_t v = 32'hFFFF_FFFF;
        for (int i = 0; i < N - SEG * a; i++) v = step(v, 1'b0, poly);
        axi_write(1, 4'h8, v);
      end
    write_goback(1, poly);
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] info;
    int words, nf;
    for (int m = 0; m < 2; m++) begin
      awaddr[m] = '0; araddr[m] = '0; awvalid[m] = 0; wvalid[m] = 0;
      arvalid[m] = 0; wdata[m] = '0;
    end
    for (int s = 0; s < S; s++) sa_seg_empty[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    axi_read(0, 4'hC, info);
    checks++;
    if (info != NT1 + 7 + 7 * H) begin failures++; $display("ns INFO %0d", info); end
    axi_read(1, 4'hC, info);
    checks++;
    if (info != S * NTS + 7 + NIA + 7 * H) begin failures++; $display("sa INFO %0d", info); end
    fork
      ns_run(60, CRC32);
      sa_run(150, CRC32);
    join
    // 65-byte frames back to back: nine segments per frame
    nf = S;   // 9*S segments: exactly nine full words
    for (int f = 0; f < nf; f++) sa_add(65, CRC32, 0);
    sa_send(0, words);
    checks++;
    if (words != 9 || nf * 65 * 8 * 72 != words * N * 65) begin failures++; $display("65-byte burst: %0d words", words); end
    $display("65-byte frames: %0d in %0d words of %0d bits, payload efficiency %0.4f (65/72 = %0.4f)",
             nf, words, N, real'(nf * 65 * 8) / real'(words * N), 65.0 / 72.0);
    fork
      ns_program(CRC32C);
      sa_program(CRC32C);
    join
    n_reprog++;
    fork
      ns_run(40, CRC32C);
      sa_run(100, CRC32C);
    join
    checks++;
    if (ns_single == 0 || ns_multi == 0 || ns_pad == 0 || ns_gap == 0 || ns_b2b == 0 ||
        ns_bits != '1 || sa_bits != '1 || sa_max_ends != K || sa_cross == 0 ||
        sa_idle_mid == 0 || sa_idle_seg == 0 || n_reprog == 0 ||
        ns_exp.size() != 0 || sa_exp.size() != 0) begin
      failures++;
      $display("coverage missing");
    end
    $display("ns: single-word %0d multi-word %0d padded %0d gaps %0d back-to-back %0d go-back bits %b",
             ns_single, ns_multi, ns_pad, ns_gap, ns_b2b, ns_bits);
    $display("sa: max frames ending in one word %0d, words crossed %0d, idle words in frames %0d, idle segments %0d, go-back bits %b",
             sa_max_ends, sa_cross, sa_idle_mid, sa_idle_seg, sa_bits);
    $display("polynomial switches %0d", n_reprog);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
