// tb_crc_go_back: checks region 4 at a 128-bit bus (4 stages). A random state
// and a random number of padding bytes enter every clock; four clocks later
// the output must be the state run backwards over 8*q zero bits by a
// bit-serial inverse LFSR, XORed with the final value.
module tb_crc_go_back;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int H = 4;
  localparam c32_t P = 32'hEDB8_8320;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t      cfg = '0;
  logic         in_valid = 0, out_valid;
  crc_t         in_crc = '0, out_crc;
  logic [H-1:0] in_qb = '0;
  c32_t         exp_q [$];
  int checks = 0, failures = 0;

  crc_go_back #(.DATA_W(128)) dut (.clk, .rst_n, .cfg, .in_valid, .in_crc, .in_qb,
                                   .out_valid, .out_crc);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      if (n >= H) begin
        checks++;
        if (out_valid !== ((n - H) % 3 != 0)) begin
          failures++;
          $display("valid wrong at %0d", n);
        end
        if (out_valid) begin
          automatic c32_t e = exp_q.pop_front();
          checks++;
          if (out_crc !== e) begin
            failures++;
            $display("q case: %08x expected %08x", out_crc, e);
          end
        end
      end
      in_valid = (n % 3 != 0);
      in_crc   = $urandom();
      in_qb    = H'($urandom());
      if (in_valid) begin
        automatic c32_t c = in_crc;
        for (int i = 0; i < 8 * int'(in_qb); i++) c = unstep(c, P);
        exp_q.push_back(c ^ 32'hFFFF_FFFF);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
