// tb_rs_fb_ctrl: random data, tap, feedback and enable; checks switch #1 and
// the feedback sum, switch #2, and the 8-clock delay of the gated feedback.
module tb_rs_fb_ctrl;
  logic clk = 0, rst_n = 0;
  logic fb_en = 0, data_in = 0, tap_in = 0, fb_in = 0;
  logic fb_out, fb_gated, fb_dly_out;
  int checks = 0, failures = 0;
  logic hist [0:4095];

  rs_fb_ctrl dut (.*);

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
      {fb_en, data_in, tap_in, fb_in} = 4'($urandom);
      hist[n] = fb_in && fb_en;
      #1;
      check(fb_out == ((data_in && fb_en) != tap_in), "fb_out");
      check(fb_gated == hist[n], "fb_gated");
      check(fb_dly_out == (n >= 8 ? hist[n-8] : 1'b0), "fb_dly_out");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
