// rs_coef_table: generator-polynomial coefficient table of one encoder chip.
//
// With a symmetric generator polynomial only E distinct coefficients other
// than 1 exist (g_1 .. g_E, 16 of them for E = 16). The table holds all E of
// them; a G-select code, wired per chip position, picks the M = E/N_CHIPS
// coefficients used by that chip's M multipliers. This is the 16 x 8 table and
// four 4-to-1 multiplexers of the design (equivalently four 4 x 8 ROMs
// addressed by the two G-select pins).
//
// Assignment of coefficients to chips (this design's choice, chosen so that
// each chip exports and imports exactly one product): the chip with G-select
// value s serves coefficients g_{b+1} .. g_{b+M}, b = M*(N_CHIPS-1-s); output
// coef[m] is g_{b+m+1}. The first chip (s = 0) thus holds g_13..g_16 and the
// last chip (s = 3) g_1..g_4.
//
// Purely combinational; the table contents are computed at elaboration from
// the field polynomial and the generator roots (see rs_pkg::gen_coefs).
module rs_coef_table #(
  parameter int unsigned J          = 8,
  parameter int unsigned E          = 16,
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned FIELD_POLY = 32'h11D,   // x^8+x^4+x^3+x^2+1
  parameter int unsigned ROOT_EXP   = 1,        // beta = alpha^ROOT_EXP
  parameter int unsigned FIRST_ROOT = (1 << (J - 1)) - E,  // 112
  localparam int unsigned M  = E / N_CHIPS,
  localparam int unsigned SW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1
) (
  input  logic [SW-1:0] gsel,            // chip position: 0 = first chip
  output logic [J-1:0]  coef [M]         // coefficients for the M multipliers
);

  localparam rs_pkg::gpoly_t G = rs_pkg::gen_coefs(E, FIRST_ROOT, ROOT_EXP, FIELD_POLY, J);

  // table[t] = g_{t+1}, t = 0 .. E-1
  logic [J-1:0] table_q [E];
  for (genvar t = 0; t < int'(E); t++) begin : g_tab
    assign table_q[t] = J'(G[t+1]);
  end

  always_comb begin
    for (int m = 0; m < int'(M); m++)
      coef[m] = table_q[(int'(N_CHIPS) - 1 - int'(gsel)) * int'(M) + m];
  end

endmodule
