// tb_rs_ram_stage: the RAM stage register at interleaving levels 5, 1 and 3
// (each after a clearing reset, starting from random RAM contents). Checks
// that dout is din delayed ilevel x 8 clocks and tap is din delayed
// (ilevel-1) x 8 clocks, zeros before that.
module tb_rs_ram_stage;
  logic clk = 0, rst_n = 0, din = 0;
  logic [2:0] ilevel = 3'd5;
  logic dout, tap;
  int checks = 0, failures = 0;
  logic hist [0:4095];

  rs_ram_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s il=%0d", what, ilevel); end
  endfunction

  initial begin
    int lv [3] = '{5, 1, 3};
    for (int r = 0; r < 3; r++) begin
      int len;
      rst_n = 0;
      ilevel = 3'(lv[r]);
      din = 1;                            // must not reach the RAM in reset
      len = lv[r] * 8;
      repeat (45) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < 1000; n++) begin
        din = 1'($urandom);
        hist[n] = din;
        #1;
        check(dout == (n >= len ? hist[n-len] : 1'b0), "dout");
        check(tap == (n >= len - 8 ? hist[n-len+8] : 1'b0), "tap");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
