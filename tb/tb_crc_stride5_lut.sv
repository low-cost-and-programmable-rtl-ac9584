// tb_crc_stride5_lut: checks region 1. For random words, the XOR of the
// table outputs of each segment, one clock later, must equal the CRC state
// that a bit-serial LFSR reaches from zero over the whole word when only
// that segment's bits are kept (W * B of the segment). Two instances: a
// 128-bit word in two 64-bit segments (twelve 5-bit keys and one 4-bit key
// per segment) and a 37-bit word in one segment (a 2-bit remainder key).
module tb_crc_stride5_lut;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam c32_t P = 32'hEDB8_8320;

  logic clk = 0;
  always #5 clk = ~clk;
  cfg_wr_t       cfg = '0;
  logic [127:0]  d_a = '0, d_a_q;
  logic [36:0]   d_b = '0, d_b_q;
  crc_t          md_a [2][13];
  crc_t          md_b [1][8];
  int checks = 0, failures = 0;

  crc_stride5_lut #(.DATA_W(128), .SEG_W(64)) dut_a (.clk, .cfg, .in_data(d_a), .md(md_a));
  crc_stride5_lut #(.DATA_W(37))              dut_b (.clk, .cfg, .in_data(d_b), .md(md_b));

  function automatic c32_t serial(logic [127:0] d, int n, int lo, int hi);
    c32_t c = '0;
    for (int j = 0; j < n; j++) c = step(c, (j >= lo && j < hi) ? d[j] : 1'b0, P);
    return c;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      d_a = {$urandom(), $urandom(), $urandom(), $urandom()};
      d_b = 37'({$urandom(), $urandom()});
      if (n == 0) begin d_a = '1; d_b = '1; end
      d_a_q = d_a; d_b_q = d_b;
      @(posedge clk);   // tables registered here
      #1;
      for (int s = 0; s < 2; s++) begin
        automatic c32_t x = '0;
        for (int t = 0; t < 13; t++) x ^= md_a[s][t];
        checks++;
        if (x !== serial(d_a_q, 128, 64 * s, 64 * s + 64)) begin
          failures++;
          $display("128/64 segment %0d: %08x", s, x);
        end
      end
      begin
        automatic c32_t x = '0;
        for (int t = 0; t < 8; t++) x ^= md_b[0][t];
        checks++;
        if (x !== serial(128'(d_b_q), 37, 0, 37)) begin
          failures++;
          $display("37-bit word: %08x", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
