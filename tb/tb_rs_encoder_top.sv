// tb_rs_encoder_top: end-to-end test of the complete encoder at its default
// size: (255,223) code, GF(2^8) with x^8+x^4+x^3+x^2+1, 16 roots either side
// of alpha^127.5, interleaving depth 5, four chips.
//
// Three back-to-back blocks of random information (the first one all zero
// except a single symbol) are streamed in with no reset between them. Every
// output bit is compared with a reference encoder (polynomial long division),
// and every received code word is checked to vanish at all 32 generator
// roots. Cycle counts checked: information phase 8920 bit clocks, first
// parity bit on the clock right after the last information bit, block period
// 10200 bit clocks. Mechanisms counted: information phase with feedback,
// parity read-out with feedback off, block restart without reset, and a
// nonzero product crossing every chip boundary.
module tb_rs_encoder_top;
  import tb_rs_ref_pkg::*;

  localparam int J = 8, I = 5, TWO_E = 32, NSYM = 255, K = NSYM - TWO_E;
  localparam int INFO_BITS = K * I * J;        // 8920
  localparam int BLOCK_BITS = NSYM * I * J;    // 10200
  localparam int NBLK = 3;

  logic [2:0] ilevel = 3'd5;
  logic clk = 0, rst_n = 0, data_in = 0;
  logic code_out, info_phase, sym_end, block_start;
  logic [2:0] bit_idx; logic [2:0] cw_idx; logic [7:0] column;

  rs_encoder_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_info_phase = 0, n_parity_phase = 0, n_restart = 0, n_xchip = 0;

  initial begin
    #(10 * (NBLK * BLOCK_BITS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rs_ref ref_m;
  int unsigned info [I][K];
  int unsigned par [I][64];
  int unsigned rx [I][NSYM];
  int unsigned msg [];
  int unsigned cwv [];
  logic [NBLK-1:0] seen_xchip;

  task automatic new_block(int b);
    for (int c = 0; c < I; c++)
      for (int s = 0; s < K; s++)
        info[c][s] = (b == 0) ? ((c == 2 && s == 100) ? 8'h5A : 0) : ($urandom & 8'hFF);
    for (int c = 0; c < I; c++) begin
      msg = new[K];
      for (int s = 0; s < K; s++) msg[s] = info[c][s];
      ref_m.encode(msg, par[c]);
    end
  endtask

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  initial begin
    int prev_start;
    ref_m = new(32'h11D, 1, 112, TWO_E);
    new_block(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_start = -1;
    for (int b = 0; b < NBLK; b++) begin
      if (b > 0) new_block(b);
      for (int n = 0; n < BLOCK_BITS; n++) begin
        int s, col, c, bt, exp_bit;
        bt = 7 - (n % 8);
        if (n < INFO_BITS) begin
          s = n / 8; col = s / I; c = s % I;
          data_in = info[c][col][bt];
          exp_bit = data_in;
        end else begin
          s = (n - INFO_BITS) / 8; c = s % I; col = TWO_E - 1 - s / I;
          data_in = $urandom & 1;           // must be ignored
          exp_bit = par[c][col][bt];
        end
        #1;
        check(info_phase == (n < INFO_BITS), "info_phase");
        check(code_out == exp_bit[0], "code_out");
        if (n == 0) check(block_start, "block_start");
        // record the received symbol stream for the syndrome check
        if (n < INFO_BITS) begin
          s = n / 8; rx[s % I][s / I][bt] = code_out;
        end else begin
          s = (n - INFO_BITS) / 8;
          rx[s % I][K + (s / I)][bt] = code_out;
        end
        if (n < INFO_BITS) n_info_phase++; else n_parity_phase++;
        // a product crossing a chip boundary that is nonzero
        if (dut.g_row.prod_i[0] || dut.g_row.prod_i[1] || dut.g_row.prod_i[2]) seen_xchip[b] = 1;
        @(negedge clk);
      end
      if (b > 0) n_restart++;
      if (seen_xchip[b]) n_xchip++;
      for (int c = 0; c < I; c++) begin
        cwv = new[NSYM];
        for (int k = 0; k < NSYM; k++) cwv[k] = rx[c][k];
        check(ref_m.syndromes_nonzero(cwv) == 0, "syndromes");
      end
      $display("block %0d done, checks=%0d failures=%0d", b, checks, failures);
    end
    check(n_info_phase == NBLK * INFO_BITS, "info phase count");
    check(n_parity_phase == NBLK * (BLOCK_BITS - INFO_BITS), "parity phase count");
    check(n_restart == NBLK - 1, "restart without reset");
    check(n_xchip == NBLK, "cross-chip products");
    $display("mechanisms: info_bits=%0d parity_bits=%0d restarts=%0d xchip_blocks=%0d",
             n_info_phase, n_parity_phase, n_restart, n_xchip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
