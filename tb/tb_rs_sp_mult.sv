// tb_rs_sp_mult: streams random symbols MSB first into the serial-parallel
// multiplier with random coefficients and checks that each product appears
// in the output register at the end of the symbol and is shifted out MSB
// first during the next symbol (one-symbol latency), for both field
// polynomials.
module tb_rs_sp_mult;
  import tb_rs_ref_pkg::*;

  logic clk = 0, rst_n = 0, bit_in = 0, sym_end = 0;
  logic [7:0] coef = 0;
  logic pa, pb;
  logic [7:0] proda, prodb;
  int checks = 0, failures = 0;

  rs_sp_mult dut_a (.clk, .rst_n, .coef, .bit_in, .sym_end, .prod_bit(pa), .product(proda));
  rs_sp_mult #(.FIELD_POLY(32'h187)) dut_b (.clk, .rst_n, .coef, .bit_in, .sym_end,
                                            .prod_bit(pb), .product(prodb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endfunction

  initial begin
    rs_ref ra = new(32'h11D, 1, 112, 32);
    rs_ref rb = new(32'h187, 1, 112, 32);
    int unsigned ea = 0, eb = 0, sym;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      sym = (t < 3) ? (t == 0 ? 8'h01 : 8'h80) : ($urandom & 8'hFF);
      if (t % 10 == 0) coef = 8'($urandom);
      for (int k = 7; k >= 0; k--) begin
        bit_in = sym[k];
        sym_end = (k == 0);
        #1;
        // previous product shifts out MSB first
        if (t > 0) begin
          check(pa == ea[k], "serial product (main)");
          check(pb == eb[k], "serial product (alt)");
        end
        @(negedge clk);
      end
      ea = ra.mul(coef, sym);
      eb = rb.mul(coef, sym);
      check(proda == 8'(ea), "parallel product (main)");
      check(prodb == 8'(eb), "parallel product (alt)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
