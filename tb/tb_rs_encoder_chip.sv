// tb_rs_encoder_chip: drives two encoder chips (G-select 1 and 3) with random
// serial inputs on every pin and compares every output, every bit clock, with
// a bit-level model of the chip built from the reference field arithmetic:
// products g * (gated feedback symbol) shifted out one symbol later, the Z, X
// and Y segments of 40-bit stages with XOR adders (Z: g_{b+1..b+4}, X:
// g_{b+3..b+1}, Y: imported product), the 32-bit tap, the feedback sum and
// the one-symbol feedback delay.
module tb_rs_encoder_chip;
  import tb_rs_ref_pkg::*;

  localparam int NC = 2, M = 4, LEN = 40, TAP = 32, NCYC = 3000;
  localparam int GS [NC] = '{1, 3};

  logic clk = 0, rst_n = 0, sym_end = 0;
  logic fb_en = 0, data_in = 0, fb_tap_in = 0, fb_in = 0;
  logic [NC-1:0] prod_in = 0, x_in = 0, y_prev_in = 0, z_in = 0;
  logic [NC-1:0] fb_out, fb_dly_out, prod_out, x_out, y_out, z_out, tap_out;
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    rs_encoder_chip dut (
      .clk, .rst_n, .sym_end, .gsel(2'(GS[c])), .ilevel(3'd5), .fb_en, .data_in, .fb_tap_in, .fb_in,
      .x_in(x_in[c]), .y_prev_in(y_prev_in[c]), .prod_in(prod_in[c]), .z_in(z_in[c]),
      .fb_out(fb_out[c]), .fb_dly_out(fb_dly_out[c]), .prod_out(prod_out[c]),
      .x_out(x_out[c]), .y_out(y_out[c]), .z_out(z_out[c]), .tap_out(tap_out[c])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endfunction

  // bit histories
  bit fbg [NCYC];
  bit zin [NC][M][NCYC];
  bit xin [NC][M-1][NCYC];
  bit yin [NC][NCYC];
  bit pr  [NC][M][NCYC];

  function automatic bit delayed(bit h [NCYC], int n, int d);
    return (n >= d) ? h[n-d] : 1'b0;
  endfunction

  initial begin
    rs_ref r = new(32'h11D, 1, 112, 32);
    int unsigned fsym, prod;
    int b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      int k;
      k = n % 8;
      sym_end = (k == 7);
      if (n % 40 == 0) fb_en = ($urandom % 4) != 0;
      {data_in, fb_tap_in, fb_in} = 3'($urandom);
      prod_in = NC'($urandom); x_in = NC'($urandom);
      y_prev_in = NC'($urandom); z_in = NC'($urandom);
      fbg[n] = fb_in & fb_en;
      for (int c = 0; c < NC; c++) begin
        b = M * (3 - GS[c]);
        // products of the previous symbol's gated feedback
        for (int m = 0; m < M; m++) begin
          if (n < 8) pr[c][m][n] = 0;
          else begin
            fsym = 0;
            for (int q = 0; q < 8; q++) fsym = (fsym << 1) | fbg[(n / 8 - 1) * 8 + q];
            prod = r.mul(r.g[b + m + 1], fsym);
            pr[c][m][n] = prod[7 - k];
          end
        end
        for (int i = 0; i < M; i++)
          zin[c][i][n] = ((i == 0) ? z_in[c] : delayed(zin[c][i-1], n, LEN)) ^ pr[c][i][n];
        for (int i = 0; i < M - 1; i++)
          xin[c][i][n] = ((i == 0) ? x_in[c] : delayed(xin[c][i-1], n, LEN)) ^ pr[c][M-2-i][n];
        yin[c][n] = y_prev_in[c] ^ prod_in[c];
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(fb_out[c] == ((data_in & fb_en) ^ fb_tap_in), "fb_out");
        check(fb_dly_out[c] == delayed(fbg, n, 8), "fb_dly_out");
        check(prod_out[c] == pr[c][M-1][n], "prod_out");
        check(z_out[c] == delayed(zin[c][M-1], n, LEN), "z_out");
        check(x_out[c] == delayed(xin[c][M-2], n, LEN), "x_out");
        check(y_out[c] == delayed(yin[c], n, LEN), "y_out");
        check(tap_out[c] == delayed(xin[c][M-2], n, TAP), "tap_out");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
