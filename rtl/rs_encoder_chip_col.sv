// rs_encoder_chip_col: universal encoder chip for column partitioning.
//
// Same parts as rs_encoder_chip (coefficient table, M serial multipliers,
// 2M adders with stage registers, switches and feedback delay) but the chip
// holds 2M consecutive positions of the stage chain, and every multiplier
// output and every adder's product input is a pin: prod_out[m] is the serial
// product g_{b+m+1} * feedback (b = M*(N_CHIPS-1-gsel), as in the coefficient
// table) and prod_in[i] is added in front of the chip's i-th stage. With
// M = 4 that is 4 + 8 product pins plus chain in and out, six more signal
// pins than the row-partitioned chip. Which product drives which adder is
// decided by the board wiring (see rs_encoder_top), not inside the chip.
//
// The chain enters at chain_in (MSB of the previous chip's last stage; 0 on
// the chip holding position 0) and leaves at chain_out; tap_out is the
// (I-1) x J tap of the chip's last stage, used on the chip holding the last
// position. Timing as in rs_encoder_chip: one bit per clock, sym_end marks
// the last bit of each symbol. STAGE_RAM selects RAM stage registers with a
// run-time interleaving level, as in rs_encoder_chip.
module rs_encoder_chip_col #(
  parameter int unsigned J          = 8,
  parameter int unsigned E          = 16,
  parameter int unsigned I          = 5,
  parameter int unsigned N_CHIPS    = 4,
  parameter int unsigned FIELD_POLY = 32'h11D,
  parameter int unsigned ROOT_EXP   = 1,
  parameter int unsigned FIRST_ROOT = (1 << (J - 1)) - E,
  parameter bit          STAGE_RAM  = 1'b0,
  localparam int unsigned M  = E / N_CHIPS,
  localparam int unsigned SW = (N_CHIPS > 1) ? $clog2(N_CHIPS) : 1,
  localparam int unsigned LW = $clog2(I + 1)
) (
  input  logic          clk,         // bit clock
  input  logic          rst_n,       // synchronous, active low
  input  logic          sym_end,     // last bit of a symbol
  input  logic [SW-1:0] gsel,        // G-select pins
  input  logic [LW-1:0] ilevel,      // interleaving level (RAM version only)
  input  logic          fb_en,       // feedback enable
  input  logic          data_in,     // serial information input
  input  logic          fb_tap_in,   // tap of the last stage (used on one chip)
  input  logic          fb_in,       // common feedback line
  input  logic [2*M-1:0] prod_in,    // product input of each adder
  input  logic          chain_in,    // MSB of the previous stage
  output logic          fb_out,      // feedback output
  output logic          fb_dly_out,  // feedback delayed one symbol
  output logic [M-1:0]  prod_out,    // serial product of each multiplier
  output logic          chain_out,   // MSB of the chip's last stage
  output logic          tap_out      // (I-1)xJ tap of the chip's last stage
);

  localparam int unsigned LEN = I * J;
  localparam int unsigned TAP = (I - 1) * J;

  logic [J-1:0]   coef [M];
  logic           fb_gated;
  logic [2*M-1:0] msb, tap;

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
      .prod_bit (prod_out[m]),
      .product  (product_unused)
    );
  end

  for (genvar i = 0; i < int'(2 * M); i++) begin : g_stage
    logic prev;
    if (i == 0) begin : g_first
      assign prev = chain_in;
    end else begin : g_rest
      assign prev = msb[i-1];
    end
    if (STAGE_RAM) begin : g_ram
      rs_ram_stage #(.J(J), .I_MAX(I)) u_sr (
        .clk, .rst_n, .ilevel,
        .din  (prev ^ prod_in[i]),
        .dout (msb[i]),
        .tap  (tap[i])
      );
    end else begin : g_sr
      rs_delay_sr #(.LEN(LEN), .TAP(TAP)) u_sr (
        .clk, .rst_n,
        .din  (prev ^ prod_in[i]),
        .dout (msb[i]),
        .tap  (tap[i])
      );
    end
  end

  assign chain_out = msb[2*M-1];
  assign tap_out   = tap[2*M-1];

endmodule
