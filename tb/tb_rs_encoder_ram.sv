// tb_rs_encoder_ram: the complete encoder built with RAM stage registers
// (STAGE_RAM = 1), run at interleaving levels 5, 1 and 3, each after a
// clearing reset and each for two back-to-back blocks of random information.
// Every output bit is compared with the reference encoder and every code
// word is checked to vanish at the 32 generator roots; the information phase
// must last 223 x ilevel symbols and the block 255 x ilevel symbols.
module tb_rs_encoder_ram;
  import tb_rs_ref_pkg::*;

  localparam int J = 8, IMAX = 5, TWO_E = 32, NSYM = 255, K = NSYM - TWO_E;

  logic [2:0] ilevel = 3'd5;
  logic clk = 0, rst_n = 0, data_in = 0;
  logic code_out, info_phase, sym_end, block_start;
  logic [2:0] bit_idx; logic [2:0] cw_idx; logic [7:0] column;

  rs_encoder_top #(.STAGE_RAM(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, levels_run = 0;

  initial begin
    #(10 * 2 * NSYM * J * (5 + 1 + 3) + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rs_ref ref_m;
  int unsigned info [IMAX][K];
  int unsigned par [IMAX][64];
  int unsigned rx [IMAX][NSYM];
  int unsigned msg [];
  int unsigned cwv [];

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s il=%0d at %0t", what, ilevel, $time);
    end
  endfunction

  task automatic run_level(int il);
    int info_bits = K * il * J, block_bits = NSYM * il * J, info_cnt;
    rst_n = 0;
    ilevel = 3'(il);
    repeat (50) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      info_cnt = 0;
      for (int c = 0; c < il; c++) begin
        msg = new[K];
        for (int s = 0; s < K; s++) begin
          info[c][s] = $urandom & 8'hFF;
          msg[s] = info[c][s];
        end
        ref_m.encode(msg, par[c]);
      end
      for (int n = 0; n < block_bits; n++) begin
        int s, col, c, bt, exp_bit;
        bt = 7 - (n % 8);
        if (n < info_bits) begin
          s = n / 8; col = s / il; c = s % il;
          data_in = info[c][col][bt];
          exp_bit = data_in;
        end else begin
          s = (n - info_bits) / 8; c = s % il; col = TWO_E - 1 - s / il;
          data_in = $urandom & 1;
          exp_bit = par[c][col][bt];
        end
        #1;
        check(code_out == exp_bit[0], "code_out");
        if (info_phase) info_cnt++;
        if (n == 0) check(block_start, "block_start");
        if (n < info_bits) begin
          s = n / 8; rx[s % il][s / il][bt] = code_out;
        end else begin
          s = (n - info_bits) / 8; rx[s % il][K + (s / il)][bt] = code_out;
        end
        @(negedge clk);
      end
      check(info_cnt == info_bits, "information phase length");
      for (int c = 0; c < il; c++) begin
        cwv = new[NSYM];
        for (int k = 0; k < NSYM; k++) cwv[k] = rx[c][k];
        check(ref_m.syndromes_nonzero(cwv) == 0, "syndromes");
      end
    end
    levels_run++;
    $display("interleaving level %0d done, checks=%0d failures=%0d", il, checks, failures);
  endtask

  initial begin
    ref_m = new(32'h11D, 1, 112, TWO_E);
    run_level(5);
    run_level(1);
    run_level(3);
    check(levels_run == 3, "all interleaving levels exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
