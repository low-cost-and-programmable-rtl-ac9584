// tb_crc_lut5: checks one logical table: every entry reads back its power-up
// value, writes addressed to the table replace exactly one entry on the next
// edge, and writes to another table identifier change nothing.
module tb_crc_lut5;
  import crc_pkg::*;

  localparam int ID = 5;

  function automatic tbl_t init_vals();
    tbl_t t;
    for (int k = 0; k < 32; k++) t[k] = 32'h1234_0000 + 32'(k * 32'h0101);
    return t;
  endfunction

  logic        clk = 0;
  always #5 clk = ~clk;
  cfg_wr_t     cfg = '0;
  logic [4:0]  key = '0;
  crc_t        y;
  crc_t        model [32];
  int checks = 0, failures = 0;

  crc_lut5 #(.TBL_ID(ID), .INIT(init_vals())) dut (.clk, .cfg, .key, .y);

  task automatic check_all();
    for (int k = 0; k < 32; k++) begin
      key = 5'(k);
      #1;
      checks++;
      if (y !== model[k]) begin
        failures++;
        $display("entry %0d: %08x expected %08x", k, y, model[k]);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 32; k++) model[k] = 32'h1234_0000 + 32'(k * 32'h0101);
    check_all();
    for (int n = 0; n < 60; n++) begin
      automatic int   e  = $urandom_range(0, 31);
      automatic bit   me = $urandom_range(0, 2) != 0;
      automatic crc_t d  = $urandom();
      @(negedge clk);
      cfg.we = 1; cfg.tbl = me ? 12'(ID) : 12'(ID + 1 + $urandom_range(0, 3));
      cfg.entry = 5'(e); cfg.data = d;
      @(negedge clk);
      cfg.we = 0;
      if (me) model[e] = d;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
