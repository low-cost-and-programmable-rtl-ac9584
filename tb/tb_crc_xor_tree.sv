// tb_crc_xor_tree: checks region 2. Random inputs enter every clock; the sum
// must come out, with its sideband, exactly ceil(log_RADIX(NIN)) clocks
// later (3 levels for 40 inputs of radix 6... 40 -> 7 -> 2 -> 1). At the end
// the reset must clear the sideband within one clock.
module tb_crc_xor_tree;
  import crc_pkg::*;

  localparam int NIN = 40;
  localparam int LV  = 3;

  logic clk = 0;
  logic rst_n = 1;
  always #5 clk = ~clk;
  crc_t       in_x [NIN];
  logic [7:0] in_sb = '0;
  crc_t       out_x;
  logic [7:0] out_sb;
  crc_t       exp_x  [$];
  logic [7:0] exp_sb [$];
  int checks = 0, failures = 0;

  crc_xor_tree #(.NIN(NIN), .RADIX(6), .SB_W(8)) dut (.clk, .rst_n, .in_x, .in_sb, .out_x, .out_sb);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      automatic crc_t x = '0;
      @(negedge clk);
      if (n >= LV) begin
        automatic crc_t e = exp_x.pop_front();
        automatic logic [7:0] es = exp_sb.pop_front();
        checks++;
        if (out_x !== e || out_sb !== es) begin
          failures++;
          $display("cycle %0d: %08x/%02x expected %08x/%02x", n, out_x, out_sb, e, es);
        end
      end
      for (int i = 0; i < NIN; i++) begin
        in_x[i] = $urandom();
        x ^= in_x[i];
      end
      in_sb = 8'(n);
      exp_x.push_back(x);
      exp_sb.push_back(in_sb);
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
