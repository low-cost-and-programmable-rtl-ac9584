// tb_crc_seg: self-checking test of the segmented CRC engine.
//
// Frames of 64..256 bytes are packed into SEG-bit segments, with random idle
// segments between frames and random idle words (also in the middle of a
// frame), and streamed one word per clock. Each CRC is compared with a
// bit-serial CRC-32 of its frame, in order, and the delay from the frame's
// last word to its result is checked against the pipeline depth. The run
// then rewrites every table over AXI4-Lite for CRC-32C (contents computed
// here bit by bit) and checks again. A burst of back-to-back 65-byte frames
// measures the bus efficiency, which must be 65/72 with 64-bit segments (a
// 65-byte frame takes nine 8-byte segments; 65/80 with 128-bit segments, and
// so on). It also checks that each mechanism of the engine
// happened: several frames ending in one word (up to the slot count), frames
// crossing words, the carry across idle words, and every go-back stage used.
// DATA_W (parameter N) defaults to 1024 bits (two slots) to keep the run short;
// the segment width SEG defaults to 64 bits and may be set to any multiple of
// 8 that divides N.
module tb_crc_seg #(
  parameter int N   = 1024,
  parameter int SEG = 64
);
  import crc_ref_pkg::*;

  localparam int SB   = SEG / 8;
  localparam int EW   = $clog2(SB);
  localparam int SPF  = (65 + SB - 1) / SB;   // segments per 65-byte frame
  localparam int S    = N / SEG;
  localparam int H    = $clog2(N / 8);
  localparam int K    = N / 512;
  localparam int NTS  = (SEG + 4) / 5;
  localparam int NIA  = (S + 31) / 32;
  localparam int NTAB = S * NTS + 7 + NIA + 7 * H;
  localparam c32_t CRC32  = 32'hEDB8_8320;
  localparam c32_t CRC32C = 32'h82F6_3B78;

  function automatic int levels(int n, int r);
    int lv = 0;
    while (n > 1) begin n = (n + r - 1) / r; lv++; end
    return lv;
  endfunction
  localparam int LAT = 1 + levels(NTS, 6) + levels(S, 6) + 1 + H;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           in_valid = 0;
  logic [S-1:0]   seg_valid = '0, seg_sop = '0, seg_eop = '0;
  logic [EW-1:0]  seg_empty [S];
  logic [N-1:0]   in_data = '0;
  logic [K-1:0]   out_valid;
  logic [31:0]    out_crc [K];
  logic           frame_err;
  logic [3:0]     awaddr = '0, araddr = '0;
  logic           awvalid = 0, wvalid = 0, bready = 1, arvalid = 0, rready = 1;
  logic [31:0]    wdata = '0;
  logic           awready, wready, bvalid, arready, rvalid;
  logic [1:0]     bresp, rresp;
  logic [31:0]    rdata;

  crc_seg #(.DATA_W(N), .SEG_W(SEG)) dut (
    .clk, .rst_n, .in_valid, .seg_valid, .seg_sop, .seg_eop, .seg_empty,
    .in_data, .out_valid, .out_crc, .frame_err,
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
  int max_ends = 0, n_cross = 0, n_idle_mid = 0, n_idle_seg = 0, n_reprog = 0;
  int n_frames_word_once = 0;
  logic [H-1:0] qb_bits = '0;

  // one segment of the stream
  typedef struct {
    bit          v, sop, eop;
    int          empty;
    byte unsigned d[SB];
    int          frame;
  } seg_t;
  seg_t stream[$];
  c32_t frame_crc[$];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int f = 0; f < K; f++) begin
      if (out_valid[f]) begin
        checks++;
        if (exp_crc.size() == 0) begin
          failures++;
          $display("unexpected result %08x", out_crc[f]);
        end else begin
          c32_t e;
          longint c0;
          e  = exp_crc.pop_front();
          c0 = exp_cyc.pop_front();
          if (out_crc[f] !== e) begin
            failures++;
            $display("slot %0d CRC %08x expected %08x", f, out_crc[f], e);
          end
          checks++;
          if (cyc - c0 != longint'(LAT)) begin
            failures++;
            $display("latency %0d, expected %0d", cyc - c0, LAT);
          end
        end
      end
    end
    if (frame_err) begin
      failures++;
      $display("frame_err");
    end
  end

  // Append one frame (and optional idle segments before it) to the stream.
  task automatic add_frame(int len, c32_t poly, int idle_before);
    byte unsigned d[$];
    int nseg = (len + SB - 1) / SB;
    for (int i = 0; i < len; i++) d.push_back(8'($urandom()));
    frame_crc.push_back(crc_bytes(d, poly, 32'hFFFF_FFFF, 32'hFFFF_FFFF));
    for (int i = 0; i < idle_before; i++) begin
      seg_t z;
      z.v = 0; z.sop = 0; z.eop = 0; z.empty = 0; z.frame = -1;
      foreach (z.d[b]) z.d[b] = 8'($urandom());
      stream.push_back(z);
      n_idle_seg++;
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

  // Send the stream, S segments per word; returns the number of words.
  task automatic send_stream(bit idle_words, output int words);
    int open_frame = -1;
    words = 0;
    while (stream.size() != 0) begin
      int ends = 0;
      @(negedge clk);
      if (idle_words && open_frame >= 0 && $urandom_range(0, 5) == 0) begin
        in_valid = 0;
        in_data  = {N/32{$urandom()}};
        n_idle_mid++;
        continue;
      end
      in_valid = 1;
      words++;
      for (int s = 0; s < S; s++) begin
        seg_t g;
        if (stream.size() != 0) g = stream.pop_front();
        else begin
          g.v = 0; g.sop = 0; g.eop = 0; g.empty = 0; g.frame = -1;
          foreach (g.d[b]) g.d[b] = 8'h00;
        end
        seg_valid[s] = g.v;
        seg_sop[s]   = g.sop;
        seg_eop[s]   = g.eop;
        seg_empty[s] = EW'(g.empty);
        for (int b = 0; b < SB; b++) in_data[SEG*s + 8*b +: 8] = g.d[b];
        if (g.v && g.sop) open_frame = g.frame;
        if (g.v && g.eop) begin
          exp_crc.push_back(frame_crc[g.frame]);
          exp_cyc.push_back(cyc);
          qb_bits |= H'((S - 1 - s) * SB + g.empty);
          open_frame = -1;
          ends++;
        end
      end
      if (open_frame >= 0 && seg_valid[S-1]) n_cross++;
      if (ends > max_ends) max_ends = ends;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 4) @(negedge clk);
  endtask

  task automatic axi_write(logic [3:0] a, logic [31:0] d);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
  endtask

  task automatic reprogram(c32_t poly);
    c32_t cols[$], wc[$], sc[$];
    axi_write(4'h0, 0);
    axi_write(4'h4, 0);
    w_cols(N, poly, wc);
    for (int s = 0; s < S; s++) begin
      sc = wc[SEG*s : SEG*s + SEG - 1];
      for (int t = 0; t < NTS; t++)
        for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(sc, 5 * t, k));
    end
    t_cols(N, poly, cols);
    for (int t = 0; t < 7; t++)
      for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(cols, 5 * t, k));
    for (int j = 0; j < NIA; j++)
      for (int e = 0; e < 32; e++) begin
        int a = 32 * j + e;
        c32_t v = 32'hFFFF_FFFF;
        if (a < S) begin
          for (int i = 0; i < N - SEG * a; i++) v = step(v, 1'b0, poly);
        end else v = '0;
        axi_write(4'h8, v);
      end
    for (int s = 0; s < H; s++) begin
      t_cols(-(8 << (H - 1 - s)), poly, cols);
      for (int t = 0; t < 7; t++)
        for (int k = 0; k < 32; k++) axi_write(4'h8, entry_of(cols, 5 * t, k));
    end
    n_reprog++;
  endtask

  task automatic random_run(int frames, c32_t poly);
    int words;
    for (int f = 0; f < frames; f++) begin
      int len  = ($urandom_range(0, 3) == 0) ? 64 + $urandom_range(0, 8)
                                             : 64 + $urandom_range(0, 192);
      int idle = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
      add_frame(len, poly, idle);
    end
    send_stream(1, words);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words, nf;
    for (int s = 0; s < S; s++) seg_empty[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    random_run(120, CRC32);
    // bus efficiency with back-to-back 65-byte frames
    nf = S;   // SPF*S segments: exactly SPF full words
    for (int f = 0; f < nf; f++) add_frame(65, CRC32, 0);
    send_stream(0, words);
    checks++;
    if (words != SPF || nf * 65 * 8 * SPF * SB != words * N * 65) begin
      failures++;
      $display("65-byte burst took %0d words", words);
    end
    $display("65-byte frames: %0d frames in %0d words, efficiency %0.4f (65/%0d = %0.4f)",
             nf, words, real'(nf * 65 * 8) / real'(words * N), SPF * SB,
             65.0 / real'(SPF * SB));
    reprogram(CRC32C);
    random_run(120, CRC32C);
    // coverage of the engine's mechanisms
    checks++;
    if (max_ends != K || n_cross == 0 || n_idle_mid == 0 || n_idle_seg == 0 ||
        n_reprog == 0 || qb_bits != '1 || exp_crc.size() != 0) begin
      failures++;
      $display("coverage: max ends %0d cross %0d idle words %0d idle segs %0d reprog %0d qb %b left %0d",
               max_ends, n_cross, n_idle_mid, n_idle_seg, n_reprog, qb_bits, exp_crc.size());
    end
    $display("max frames ending in a word %0d, words crossed %0d, idle words in frames %0d, idle segments %0d",
             max_ends, n_cross, n_idle_mid, n_idle_seg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
