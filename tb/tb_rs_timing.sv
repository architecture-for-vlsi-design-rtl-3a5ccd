// tb_rs_timing: runs the timing counter for two blocks and checks the
// symbol strobe period (8), the code-word and column sequence, the length of
// the feedback-enable (information) phase, 223 x 40 = 8920 bit clocks per
// block, and the block period of 255 x 40 = 10200 bit clocks.
module tb_rs_timing;
  logic [2:0] ilevel = 3'd5;
  logic clk = 0, rst_n = 0;
  logic sym_end, fb_en, block_start;
  logic [2:0] bit_idx, cw_idx;
  logic [7:0] column;
  int checks = 0, failures = 0;
  int dbg_n = 0;

  rs_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s n=%0d bs=%0d col=%0d cw=%0d b=%0d", what, dbg_n, block_start, column, cw_idx, bit_idx); end
  endfunction

  initial begin
    int en_cnt = 0, starts = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2 * 10200; n++) begin
      int m;
      m = n % 10200;
      dbg_n = n;
      #1;
      check(sym_end == (n % 8 == 7), "sym_end");
      check(int'(bit_idx) == n % 8, "bit_idx");
      check(int'(cw_idx) == (n / 8) % 5, "cw_idx");
      check(int'(column) == m / 40 + 1, "column");
      check(fb_en == (m < 8920), "fb_en");
      check(block_start == (m == 0), "block_start");
      if (fb_en) en_cnt++;
      if (block_start) starts++;
      @(negedge clk);
    end
    check(en_cnt == 2 * 8920, "info phase length");
    check(starts == 2, "block starts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
