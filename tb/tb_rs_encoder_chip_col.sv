// tb_rs_encoder_chip_col: drives a column-partitioned chip (G-select 1, then
// the same stimulus style on G-select 2) with random serial inputs on every
// pin and compares every output each bit clock with a bit-level model: the
// four serial products g_{b+m+1} * (gated feedback symbol) one symbol late,
// eight stages of 40 bits each with the external product added in front, the
// 32-bit tap of the last stage, the feedback sum and the feedback delay.
module tb_rs_encoder_chip_col;
  import tb_rs_ref_pkg::*;

  localparam int NC = 2, M = 4, LEN = 40, TAP = 32, NCYC = 3000;
  localparam int GS [NC] = '{1, 2};

  logic clk = 0, rst_n = 0, sym_end = 0;
  logic fb_en = 0, data_in = 0, fb_tap_in = 0, fb_in = 0;
  logic [2*M-1:0] prod_in [NC];
  logic [NC-1:0] chain_in = 0;
  logic [NC-1:0] fb_out, fb_dly_out, chain_out, tap_out;
  logic [M-1:0] prod_out [NC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC; c++) begin : g_dut
    rs_encoder_chip_col dut (
      .clk, .rst_n, .sym_end, .gsel(2'(GS[c])), .ilevel(3'd5), .fb_en, .data_in,
      .fb_tap_in, .fb_in, .prod_in(prod_in[c]), .chain_in(chain_in[c]),
      .fb_out(fb_out[c]), .fb_dly_out(fb_dly_out[c]), .prod_out(prod_out[c]),
      .chain_out(chain_out[c]), .tap_out(tap_out[c])
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

  bit fbg [NCYC];
  bit sin [NC][2*M][NCYC];
  bit pr  [NC][M];

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
      chain_in = NC'($urandom);
      fbg[n] = fb_in & fb_en;
      for (int c = 0; c < NC; c++) begin
        prod_in[c] = 8'($urandom);
        b = M * (3 - GS[c]);
        for (int m = 0; m < M; m++) begin
          if (n < 8) pr[c][m] = 0;
          else begin
            fsym = 0;
            for (int q = 0; q < 8; q++) fsym = (fsym << 1) | fbg[(n / 8 - 1) * 8 + q];
            prod = r.mul(r.g[b + m + 1], fsym);
            pr[c][m] = prod[7 - k];
          end
        end
        for (int i = 0; i < 2 * M; i++)
          sin[c][i][n] = ((i == 0) ? chain_in[c] : delayed(sin[c][i-1], n, LEN)) ^ prod_in[c][i];
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        check(fb_out[c] == ((data_in & fb_en) ^ fb_tap_in), "fb_out");
        check(fb_dly_out[c] == delayed(fbg, n, 8), "fb_dly_out");
        for (int m = 0; m < M; m++) check(prod_out[c][m] == pr[c][m], "prod_out");
        check(chain_out[c] == delayed(sin[c][2*M-1], n, LEN), "chain_out");
        check(tap_out[c] == delayed(sin[c][2*M-1], n, TAP), "tap_out");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
