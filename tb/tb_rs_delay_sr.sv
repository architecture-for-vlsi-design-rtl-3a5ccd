// tb_rs_delay_sr: random bits through the 40-bit stage register; checks the
// full-length output (40 clocks) and the tap (32 clocks), plus a short
// instance with no tap delay (I = 1).
module tb_rs_delay_sr;
  logic clk = 0, rst_n = 0, din = 0;
  logic dout, tap, dout1, tap1;
  int checks = 0, failures = 0;
  logic hist [0:4095];

  rs_delay_sr dut (.clk, .rst_n, .din, .dout, .tap);
  rs_delay_sr #(.LEN(8), .TAP(0)) dut1 (.clk, .rst_n, .din, .dout(dout1), .tap(tap1));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      din = 1'($urandom);
      hist[n] = din;
      #1;
      check(dout == (n >= 40 ? hist[n-40] : 1'b0), "dout");
      check(tap  == (n >= 32 ? hist[n-32] : 1'b0), "tap");
      check(dout1 == (n >= 8 ? hist[n-8] : 1'b0), "dout len 8");
      check(tap1 == din, "tap 0");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
