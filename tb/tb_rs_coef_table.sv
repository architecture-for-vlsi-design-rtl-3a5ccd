// tb_rs_coef_table: checks the coefficient table of every chip position
// against generator coefficients computed by the reference model, for the
// main parameter set (x^8+x^4+x^3+x^2+1, beta = alpha) and for the
// alternative set (x^8+x^7+x^2+x+1, beta = alpha^11). Also checks that the
// reference generator is symmetric with g_0 = g_32 = 1.
module tb_rs_coef_table;
  import tb_rs_ref_pkg::*;

  localparam int M = 4;
  logic [1:0] gsel;
  logic [7:0] coef_a [M];
  logic [7:0] coef_b [M];
  int checks = 0, failures = 0;

  rs_coef_table dut_a (.gsel, .coef(coef_a));
  rs_coef_table #(.FIELD_POLY(32'h187), .ROOT_EXP(11)) dut_b (.gsel, .coef(coef_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  initial begin
    rs_ref ra = new(32'h11D, 1, 112, 32);
    rs_ref rb = new(32'h187, 11, 112, 32);
    check(ra.g[0] == 1 && ra.g[32] == 1 && rb.g[0] == 1 && rb.g[32] == 1, "g0 = g32 = 1");
    for (int j = 1; j < 32; j++) check(ra.g[j] == ra.g[32 - j] && rb.g[j] == rb.g[32 - j], "symmetry");
    for (int s = 0; s < 4; s++) begin
      gsel = 2'(s);
      #1;
      for (int m = 0; m < M; m++) begin
        check(coef_a[m] == 8'(ra.g[M * (3 - s) + m + 1]), $sformatf("main gsel=%0d m=%0d", s, m));
        check(coef_b[m] == 8'(rb.g[M * (3 - s) + m + 1]), $sformatf("alt gsel=%0d m=%0d", s, m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
