// tb_crc_seg_state: checks the per-slot region 3 at a 256-bit bus in four
// 64-bit segments with 3 slots. Each clock gives the slots random sums and
// a legal slot pattern: slot 0 either continues the open frame or starts
// one, later slots start frames, and the last present slot may stay open.
// Expected results, computed here with a serial LFSR:
//   start in segment a: INIT run over 256 - 64a zero bits, XOR the sum;
//   continuation:       carried state run over 256 zero bits, XOR the sum.
// The open slot's value must be the state carried into the next word.
module tb_crc_seg_state;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int N = 256, SEGW = 64, S = 4, NS = 3, H = 5;
  localparam c32_t P = 32'hEDB8_8320;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  cfg_wr_t       cfg = '0;
  logic          in_valid = 0;
  logic [NS-1:0] present = '0, ends = '0, cont = '0, out_valid;
  logic [1:0]    start [NS];
  logic [H-1:0]  qb [NS], out_qb [NS];
  crc_t          sum [NS], out_crc [NS];
  int checks = 0, failures = 0, n_cont = 0, n_open = 0;

  crc_seg_state #(.DATA_W(N), .SEG_W(SEGW), .NSLOT(NS)) dut (
    .clk, .rst_n, .cfg, .in_valid, .in_present(present), .in_ends(ends),
    .in_cont(cont), .in_start(start), .in_qb(qb), .in_sum(sum),
    .out_valid, .out_crc, .out_qb
  );

  function automatic c32_t adv(c32_t c, int bits);
    for (int i = 0; i < bits; i++) c = step(c, 1'b0, P);
    return c;
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c32_t carry;
    bit   open;
    c32_t exp_c [NS];
    open = 0;
    carry = '0;
    for (int f = 0; f < NS; f++) begin start[f] = '0; qb[f] = '0; sum[f] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int np = $urandom_range(1, NS);
      automatic int a = 0;
      automatic bit last_open = $urandom_range(0, 1);
      @(negedge clk);
      in_valid = 1;
      present = '0; ends = '0; cont = '0;
      for (int f = 0; f < np; f++) begin
        present[f] = 1;
        sum[f] = $urandom();
        qb[f] = H'($urandom());
        if (f == 0 && open) begin
          cont[0] = 1;
          exp_c[0] = adv(carry, N) ^ sum[0];
          n_cont++;
        end else begin
          start[f] = 2'(a);
          exp_c[f] = adv(32'hFFFF_FFFF, N - SEGW * a) ^ sum[f];
        end
        a = (a + 1 < S) ? a + 1 : a;
        ends[f] = !(f == np - 1 && last_open);
      end
      @(posedge clk);
      #1;
      for (int f = 0; f < NS; f++) begin
        checks++;
        if (out_valid[f] !== ends[f]) begin failures++; $display("valid %0d", f); end
        if (present[f]) begin
          checks++;
          if (out_crc[f] !== exp_c[f] || out_qb[f] !== qb[f]) begin
            failures++;
            $display("word %0d slot %0d: %08x expected %08x", n, f, out_crc[f], exp_c[f]);
          end
        end
      end
      open = last_open;
      if (last_open) begin carry = exp_c[np-1]; n_open++; end
    end
    checks++;
    if (n_cont == 0 || n_open == 0) failures++;
    $display("continued %0d opened %0d", n_cont, n_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
