// tb_crc_state_update: checks region 3 at a 64-bit bus. Frames of 1..6 words
// are fed as W*B values computed here by a serial LFSR from the zero state;
// at each frame's last word the registered output must equal the serial
// CRC state from INIT over all the frame's bits (padding included), one
// clock later, with the padding count passed along. Words without in_valid
// in the middle of a frame must not disturb the state.
module tb_crc_state_update;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int N = 64;
  localparam c32_t P = 32'hEDB8_8320;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t    cfg = '0;
  logic       in_valid = 0, in_sop = 0, in_eop = 0, out_valid;
  logic [2:0] in_empty = '0, out_empty;
  crc_t       in_wb = '0, out_crc;
  int checks = 0, failures = 0;
  int n_frames = 0, n_idle = 0;

  crc_state_update #(.DATA_W(N)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_sop, .in_eop, .in_empty, .in_wb,
    .out_valid, .out_crc, .out_empty
  );

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
    for (int f = 0; f < 150; f++) begin
      automatic int   nw = $urandom_range(1, 6);
      automatic c32_t ref_c = 32'hFFFF_FFFF;
      automatic logic [2:0] emp = 3'($urandom());
      for (int w = 0; w < nw; w++) begin
        automatic logic [N-1:0] d = {$urandom(), $urandom()};
        automatic c32_t wb = '0;
        for (int j = 0; j < N; j++) begin
          wb    = step(wb, d[j], P);
          ref_c = step(ref_c, d[j], P);
        end
        if (w > 0 && $urandom_range(0, 4) == 0) begin
          @(negedge clk);
          in_valid = 0; in_sop = 1; in_eop = 1; in_wb = $urandom();
          n_idle++;
        end
        @(negedge clk);
        in_valid = 1; in_sop = (w == 0); in_eop = (w == nw - 1);
        in_empty = emp; in_wb = wb;
      end
      @(negedge clk);
      in_valid = 0; in_sop = 0; in_eop = 0;
      checks++;
      if (!out_valid || out_crc !== ref_c || out_empty !== emp) begin
        failures++;
        $display("frame %0d: valid %b crc %08x expected %08x", f, out_valid, out_crc, ref_c);
      end
      n_frames++;
      if ($urandom_range(0, 1) == 0) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("valid without end of frame"); end
      end
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
