// rs_timing: bit, symbol and code-column timing for the bit-serial encoder.
//
// A bit counter (modulo J) marks the last bit of every symbol (sym_end), an
// interleave counter (modulo ilevel, normally I) numbers the code word the
// current symbol belongs to, and a column counter clocked once every
// ilevel x J bit clocks
// counts the symbol position within the code words from 1 to N_SYM (255),
// as the external modulo-255 counter of the design does. The feedback enable
// is high for columns 1 .. K (223, information symbols) and low for columns
// K+1 .. N_SYM, when the parity symbols are shifted out. After column N_SYM
// the next block starts at column 1 with no gap.
// ilevel is fixed at I for the shift-register encoder and selectable
// (1 .. I, changed only in reset) for the RAM version. All outputs come from
// registers; reset (synchronous, active low) starts a
// block at bit 0 of column 1, code word 0.
module rs_timing #(
  parameter int unsigned J     = 8,
  parameter int unsigned I     = 5,
  parameter int unsigned N_SYM = (1 << J) - 1,   // 255 symbols per code word
  parameter int unsigned K     = 223,            // information symbols
  localparam int unsigned BW = (J > 1) ? $clog2(J) : 1,
  localparam int unsigned IW = (I > 1) ? $clog2(I) : 1,
  localparam int unsigned CW = $clog2(N_SYM + 1),
  localparam int unsigned LW = $clog2(I + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] ilevel,       // interleaving level in use, 1 .. I
  output logic          sym_end,      // last bit of a symbol
  output logic          fb_en,        // information phase
  output logic [BW-1:0] bit_idx,      // bit within symbol, 0 = MSB
  output logic [IW-1:0] cw_idx,       // interleaved code word 0 .. I-1
  output logic [CW-1:0] column,       // symbol position 1 .. N_SYM
  output logic          block_start   // first bit of a block
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_idx <= '0;
      cw_idx  <= '0;
      column  <= CW'(1);
    end else if (bit_idx == BW'(J - 1)) begin
      bit_idx <= '0;
      if (cw_idx >= IW'(ilevel - 1'b1)) begin
        cw_idx <= '0;
        column <= (column == CW'(N_SYM)) ? CW'(1) : column + CW'(1);
      end else begin
        cw_idx <= cw_idx + IW'(1);
      end
    end else begin
      bit_idx <= bit_idx + BW'(1);
    end
  end

  assign sym_end     = (bit_idx == BW'(J - 1));
  assign fb_en       = (column <= CW'(K));
  assign block_start = (column == CW'(1)) && (cw_idx == '0) && (bit_idx == '0);

endmodule
