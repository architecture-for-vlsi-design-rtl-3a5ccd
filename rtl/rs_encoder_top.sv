// rs_encoder_top: complete bit-serial (255,223) Reed-Solomon encoder with
// interleaving depth 5, built from four identical symbol-slice chips.
//
// Chip k (k = 0 first .. N_CHIPS-1 last) has its G-select pins tied to k.
// Interconnect:
//   * feedback: the first chip forms data XOR tap of the last stage and
//     drives every chip's feedback input;
//   * y_prev_in (pin 8) comes from the chip's own x_out (pin 6); on the
//     last chip it is grounded;
//   * prod_in (pin 9) comes from the next chip's prod_out (pin 13); on the
//     last chip from the first chip's one-symbol-delayed feedback (pin 4);
//   * y_out (pin 7) drives the next chip's x_in (pin 17); on the last chip
//     it drives its own z_in (pin 11);
//   * z_in (pin 11) of the other chips comes from the next chip's z_out
//     (pin 10), and the first chip's z_out drives its own x_in;
//   * the last chip's tap_out (pin 14) is the parity stream.
// The stage chain thus runs: last chip Y (position 0), Z segments from the
// last chip up to the first, then X and Y of the first chip, X and Y of the
// next, and so on, ending with the last chip's X segment (position 2E-1).
// rs_timing plays the external modulo-255 counter.
//
// Interface: data_in is sampled every bit clock while info_phase is high
// (K*I = 1115 symbols = 8920 bits, MSB first, symbol i belongs to code word
// i mod I). code_out carries data_in during the information phase and then,
// immediately after the last information bit, the I*2E = 160 parity symbols
// (parity symbol 2E-1 of code words 0..I-1, then 2E-2 of each, ...), 1280
// bits. A block is N_SYM*I*J = 10200 bit clocks; blocks follow back to back.
// Selecting the systematic output with the feedback enable is this design's
// addition.
//
// STAGE_RAM = 1 builds the RAM version: stage registers are RAMs and the
// interleaving level is taken from the ilevel input (1 .. I, held stable
// and applied during a reset of at least I x J clocks); the block is then
// N_SYM x ilevel x J clocks. With STAGE_RAM = 0 (default) ilevel is ignored.
module rs_encoder_top #(
  parameter int unsigned J          = 8,
  parameter int unsigned E          = 16,
  parameter int unsigned I          = 5,
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned N_SYM      = (1 << J) - 1,
  parameter int unsigned FIELD_POLY = 32'h11D,
  parameter int unsigned ROOT_EXP   = 1,
  parameter int unsigned FIRST_ROOT = (1 << (J - 1)) - E,
  parameter bit          STAGE_RAM  = 1'b0,
  parameter bit          COLUMN_PART = 1'b0,   // 1: column-partitioned chips
  localparam int unsigned M  = E / N_CHIPS,
  localparam int unsigned K  = N_SYM - 2 * E,
  localparam int unsigned SW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1,
  localparam int unsigned BW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned IW = (I > 1) ? $clog2(I) : 1,
  localparam int unsigned CW = $clog2(N_SYM + 1),
  localparam int unsigned LW = $clog2(I + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] ilevel,       // interleaving level, RAM version only
  input  logic          data_in,      // serial information bits
  output logic          code_out,     // serial code stream
  output logic          info_phase,   // data_in is taken this clock
  output logic          sym_end,      // last bit of a symbol
  output logic          block_start,  // first bit of a block
  output logic [BW-1:0] bit_idx,
  output logic [IW-1:0] cw_idx,
  output logic [CW-1:0] column
);

  logic fb_en;
  logic [LW-1:0] ilev;
  logic fb_line, parity;
  logic [N_CHIPS-1:0] fb_out, fb_dly, tap_o;

  assign ilev = STAGE_RAM ? ilevel : LW'(I);

  rs_timing #(.J(J), .I(I), .N_SYM(N_SYM), .K(K)) u_timing (
    .clk, .rst_n,
    .ilevel (ilev),
    .sym_end, .fb_en, .bit_idx, .cw_idx, .column, .block_start
  );

  if (COLUMN_PART) begin : g_col
    // column partitioning: chip k holds positions 2Mk .. 2Mk+2M-1 and, with
    // G-select N_CHIPS-1-k, the multipliers g_{Mk+1} .. g_{Mk+M}. Position p
    // takes the product g_j, j = min(p, 2E-p), from whichever chip has it
    // (the pyramid wiring); position 0 takes the delayed feedback.
    logic [N_CHIPS-1:0] c_chain_o;
    logic [M-1:0]       c_prod_o [N_CHIPS];
    logic [2*M-1:0]     c_prod_i [N_CHIPS];

    for (genvar k = 0; k < int'(N_CHIPS); k++) begin : g_chip
      for (genvar i = 0; i < int'(2 * M); i++) begin : g_wire
        localparam int P  = 2 * int'(M) * k + i;
        localparam int JJ = (P <= int'(E)) ? P : 2 * int'(E) - P;
        if (P == 0) begin : g_x0
          assign c_prod_i[k][i] = fb_dly[0];
        end else begin : g_xj
          assign c_prod_i[k][i] = c_prod_o[(JJ - 1) / int'(M)][(JJ - 1) % int'(M)];
        end
      end

      rs_encoder_chip_col #(
        .J(J), .E(E), .I(I), .N_CHIPS(N_CHIPS), .FIELD_POLY(FIELD_POLY),
        .ROOT_EXP(ROOT_EXP), .FIRST_ROOT(FIRST_ROOT), .STAGE_RAM(STAGE_RAM)
      ) u_chip (
        .clk, .rst_n, .sym_end,
        .gsel       (SW'(int'(N_CHIPS) - 1 - k)),
        .ilevel     (ilev),
        .fb_en,
        .data_in,
        .fb_tap_in  (parity),
        .fb_in      (fb_line),
        .prod_in    (c_prod_i[k]),
        .chain_in   ((k == 0) ? 1'b0 : c_chain_o[(k == 0) ? 0 : k - 1]),
        .fb_out     (fb_out[k]),
        .fb_dly_out (fb_dly[k]),
        .prod_out   (c_prod_o[k]),
        .chain_out  (c_chain_o[k]),
        .tap_out    (tap_o[k])
      );
    end
  end else begin : g_row
    // row partitioning (default): see rs_encoder_chip for the slicing
    logic [N_CHIPS-1:0] prod_o, x_o, y_o, z_o;
    logic [N_CHIPS-1:0] prod_i, x_i, yp_i, z_i;

    for (genvar k = 0; k < int'(N_CHIPS); k++) begin : g_chip
      if (k == int'(N_CHIPS) - 1) begin : g_last
        assign yp_i[k]   = 1'b0;
        assign prod_i[k] = fb_dly[0];
        assign z_i[k]    = y_o[k];
      end else begin : g_mid
        assign yp_i[k]   = x_o[k];
        assign prod_i[k] = prod_o[k+1];
        assign z_i[k]    = z_o[k+1];
      end
      if (k == 0) begin : g_first
        assign x_i[k] = z_o[0];
      end else begin : g_next
        assign x_i[k] = y_o[k-1];
      end

      rs_encoder_chip #(
        .J(J), .E(E), .I(I), .N_CHIPS(N_CHIPS), .FIELD_POLY(FIELD_POLY),
        .ROOT_EXP(ROOT_EXP), .FIRST_ROOT(FIRST_ROOT), .STAGE_RAM(STAGE_RAM)
      ) u_chip (
        .clk, .rst_n, .sym_end,
        .gsel       (SW'(k)),
        .ilevel     (ilev),
        .fb_en,
        .data_in,
        .fb_tap_in  (parity),
        .fb_in      (fb_line),
        .x_in       (x_i[k]),
        .y_prev_in  (yp_i[k]),
        .prod_in    (prod_i[k]),
        .z_in       (z_i[k]),
        .fb_out     (fb_out[k]),
        .fb_dly_out (fb_dly[k]),
        .prod_out   (prod_o[k]),
        .x_out      (x_o[k]),
        .y_out      (y_o[k]),
        .z_out      (z_o[k]),
        .tap_out    (tap_o[k])
      );
    end
  end

  assign fb_line    = fb_out[0];
  assign parity     = tap_o[N_CHIPS-1];
  assign info_phase = fb_en;
  assign code_out   = fb_en ? data_in : parity;

endmodule
