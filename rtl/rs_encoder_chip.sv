// rs_encoder_chip: universal symbol-slice encoder chip (row partitioning).
//
// The (n, n-2E) interleaved encoder is a chain of 2E stage registers
// (positions 0 .. 2E-1), each I x J bits long, with an XOR adder in front of
// every stage: stage p takes the MSB of stage p-1 plus the serial product
// g_p * feedback. Since g_p = g_{2E-p}, one multiplier with coefficient g_k
// feeds the adders of positions k and 2E-k. A chip holds M = E/N_CHIPS
// multipliers and 2M adders and stage registers (4, 8 and 8 for the
// defaults), a coefficient table, the switches and the feedback delay.
//
// Slicing. The chip with G-select s has base b = M*(N_CHIPS-1-s) and the
// multipliers g_{b+1} .. g_{b+M} (first chip g13..g16, last chip g1..g4).
// Its stages form three segments, named here after the pins of the original
// 24-pin chip:
//   * Z: M stages, positions b+1 .. b+M, in at z_in (pin 11), out at z_out
//     (pin 10); stage i uses multiplier i.
//   * X: M-1 stages, positions 2E-b-M+1 .. 2E-b-1, in at x_in (pin 17), out
//     at x_out (pin 6); all use local multipliers (g_{b+M-1} .. g_{b+1}).
//     tap_out (pin 14) is the (I-1) x J tap of X's last stage.
//   * Y: one stage, position 2E-b (0 on the last chip). Its adder adds the
//     stage MSB on y_prev_in (pin 8) and the product on prod_in (pin 9),
//     which is g_b made on the next chip; its MSB leaves at y_out (pin 7).
// prod_out (pin 13) carries the chip's highest product g_{b+M} to the
// previous chip. Board wiring (see rs_encoder_top): pin 8 from pin 6 of the
// same chip, grounded on the last chip; pin 9 from pin 13 of the next chip,
// on the last chip from pin 4 (fb_dly_out) of the first chip; pin 7 to pin
// 17 of the next chip, on the last chip to its own pin 11; pin 11 from pin 10
// of the next chip; the first chip's pin 10 to its own pin 17. The stated
// pin connections follow the original chip; the turnaround on the first chip
// and the exact segment sizes are this design's reading of them.
//
// Stage registers are I x J bit shift registers (rs_delay_sr) or, with
// STAGE_RAM = 1, RAMs with write-after-read addressing (rs_ram_stage) whose
// length follows the ilevel input (1 .. I); ilevel is ignored otherwise.
//
// Timing: one bit per clock; sym_end marks the last bit of every symbol and
// must be common to all chips. All outputs except fb_out are registered.
module rs_encoder_chip #(
  parameter int unsigned J          = 8,
  parameter int unsigned E          = 16,
  parameter int unsigned I          = 5,
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned FIELD_POLY = 32'h11D,
  parameter int unsigned ROOT_EXP   = 1,
  parameter int unsigned FIRST_ROOT = (1 << (J - 1)) - E,
  parameter bit          STAGE_RAM  = 1'b0,     // 1: RAM stage registers
  localparam int unsigned M  = E / N_CHIPS,
  localparam int unsigned SW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1,
  localparam int unsigned LW = $clog2(I + 1)
) (
  input  logic          clk,         // bit clock
  input  logic          rst_n,       // synchronous, active low
  input  logic          sym_end,     // last bit of a symbol (every J-th clock)
  input  logic [SW-1:0] gsel,        // G-select pins: chip position
  input  logic [LW-1:0] ilevel,      // interleaving level (RAM version only)
  input  logic          fb_en,       // feedback enable
  input  logic          data_in,     // serial information input
  input  logic          fb_tap_in,   // tap of the last stage (used on first chip)
  input  logic          fb_in,       // common feedback line
  input  logic          x_in,        // pin 17: MSB of the stage before X
  input  logic          y_prev_in,   // pin 8: MSB of the stage before Y
  input  logic          prod_in,     // pin 9: product added in front of Y
  input  logic          z_in,        // pin 11: MSB of the stage before Z
  output logic          fb_out,      // pin 5: feedback output (first chip)
  output logic          fb_dly_out,  // pin 4: feedback delayed one symbol
  output logic          prod_out,    // pin 13: product g_{b+M}
  output logic          x_out,       // pin 6: MSB of X's last stage
  output logic          y_out,       // pin 7: MSB of the Y stage
  output logic          z_out,       // pin 10: MSB of Z's last stage
  output logic          tap_out      // pin 14: (I-1)xJ tap of X's last stage
);

  localparam int unsigned LEN = I * J;
  localparam int unsigned TAP = (I - 1) * J;

  logic [J-1:0] coef [M];
  logic         fb_gated;
  logic [M-1:0] prod;                     // serial products of local multipliers

  rs_coef_table #(
    .J(J), .E(E), .N_CHIPS(N_CHIPS), .FIELD_POLY(FIELD_POLY),
    .ROOT_EXP(ROOT_EXP), .FIRST_ROOT(FIRST_ROOT)
  ) u_table (
    .gsel (gsel),
    .coef (coef)
  );

  rs_fb_ctrl #(.J(J)) u_sw (
    .clk, .rst_n, .fb_en, .data_in,
    .tap_in     (fb_tap_in),
    .fb_in,
    .fb_out,
    .fb_gated,
    .fb_dly_out
  );

  for (genvar m = 0; m < int'(M); m++) begin : g_mult
    logic [J-1:0] product_unused;
    rs_sp_mult #(.J(J), .FIELD_POLY(FIELD_POLY)) u_mult (
      .clk, .rst_n,
      .coef     (coef[m]),
      .bit_in   (fb_gated),
      .sym_end,
      .prod_bit (prod[m]),
      .product  (product_unused)
    );
  end

  // one stage register, shift-register or RAM style
  // stage order in the arrays below: Z[0..M-1], X[0..M-2], Y
  localparam int unsigned NST = 2 * M;
  logic [NST-1:0] st_in, st_msb, st_tap;

  for (genvar q = 0; q < int'(NST); q++) begin : g_stage
    if (STAGE_RAM) begin : g_ram
      rs_ram_stage #(.J(J), .I_MAX(I)) u_sr (
        .clk, .rst_n, .ilevel,
        .din  (st_in[q]),
        .dout (st_msb[q]),
        .tap  (st_tap[q])
      );
    end else begin : g_sr
      rs_delay_sr #(.LEN(LEN), .TAP(TAP)) u_sr (
        .clk, .rst_n,
        .din  (st_in[q]),
        .dout (st_msb[q]),
        .tap  (st_tap[q])
      );
    end
  end

  // Z segment: positions b+1 .. b+M, stage i uses multiplier i
  for (genvar i = 0; i < int'(M); i++) begin : g_z
    if (i == 0) begin : g_first
      assign st_in[i] = z_in ^ prod[i];
    end else begin : g_rest
      assign st_in[i] = st_msb[i-1] ^ prod[i];
    end
  end

  // X segment: positions 2E-b-M+1 .. 2E-b-1, stage i uses multiplier M-2-i
  for (genvar i = 0; i < int'(M) - 1; i++) begin : g_x
    if (i == 0) begin : g_first
      assign st_in[M+i] = x_in ^ prod[M-2-i];
    end else begin : g_rest
      assign st_in[M+i] = st_msb[M+i-1] ^ prod[M-2-i];
    end
  end

  // Y stage: position 2E-b, product imported from the next chip
  assign st_in[NST-1] = y_prev_in ^ prod_in;

  assign prod_out = prod[M-1];
  assign z_out    = st_msb[M-1];
  assign x_out    = st_msb[NST-2];
  assign tap_out  = st_tap[NST-2];
  assign y_out    = st_msb[NST-1];

endmodule
