// tb_crc_seg_merge: checks the merge module with 4 segments of 13 tables and
// 3 slots. Random table outputs and random (overlapping allowed) slot masks
// enter every clock; after 2 + 1 levels each slot's output must be the XOR
// of all table outputs of the segments in its mask, with the sideband
// aligned. At the end the reset must clear the sideband within one clock.
module tb_crc_seg_merge;
  import crc_pkg::*;

  localparam int S = 4, NT = 13, NS = 3, LV = 3;

  logic clk = 0;
  logic rst_n = 1;
  always #5 clk = ~clk;
  crc_t       md [S][NT];
  logic [S-1:0] mask [NS];
  logic [7:0] in_sb = '0, out_sb;
  crc_t       sum [NS];
  crc_t       exp_s [$];
  logic [7:0] exp_b [$];
  int checks = 0, failures = 0;

  crc_seg_merge #(.S(S), .NT_SEG(NT), .NSLOT(NS), .RADIX(6), .SB_W(8)) dut (
    .clk, .rst_n, .md, .in_mask(mask), .in_sb, .out_sum(sum), .out_sb
  );

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n >= LV) begin
        for (int f = 0; f < NS; f++) begin
          automatic crc_t e = exp_s.pop_front();
          checks++;
          if (sum[f] !== e) begin
            failures++;
            $display("cycle %0d slot %0d: %08x expected %08x", n, f, sum[f], e);
          end
        end
        checks++;
        if (out_sb !== exp_b.pop_front()) begin failures++; $display("sideband"); end
      end
      for (int s = 0; s < S; s++)
        for (int t = 0; t < NT; t++) md[s][t] = $urandom();
      for (int f = 0; f < NS; f++) begin
        automatic crc_t e = '0;
        mask[f] = S'($urandom());
        for (int s = 0; s < S; s++)
          if (mask[f][s]) for (int t = 0; t < NT; t++) e ^= md[s][t];
        exp_s.push_back(e);
      end
      in_sb = 8'(n);
      exp_b.push_back(in_sb);
    end
    // the synchronous reset clears the sideband of every level at once
    @(negedge clk);
    in_sb = '1;
    rst_n = 0;
    @(negedge clk);
    checks++;
    if (out_sb !== '0) begin
      failures++;
      $display("sideband %02x during reset", out_sb);
    end
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
