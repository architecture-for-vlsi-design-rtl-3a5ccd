// rs_fb_ctrl: input and feedback control switches of one encoder chip.
//
//  * switch #1: the serial data input is ANDed with the feedback enable and
//    added (XOR) to the tap of the encoder's last stage register; the sum is
//    the chip's feedback output. Only the first chip's feedback output is
//    used; it drives the feedback input of every chip.
//  * switch #2: the feedback input ANDed with the feedback enable is the
//    serial operand of all multipliers on the chip (fb_gated).
//  * a J-bit delay register on fb_gated. Its output replaces the multiplier
//    at the x^0 position (g_0 = 1): the product by 1 must be delayed one
//    symbol like every real product. Only the first chip's copy is used.
// Feedback enable is high while information symbols enter and low while
// parity is read out, when the whole encoder acts as a long shift register.
// Delaying the gated rather than the ungated feedback is this design's
// choice; it keeps the x^0 term silent during parity read-out.
module rs_fb_ctrl #(
  parameter int unsigned J = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic fb_en,       // feedback enable (from the timing counter)
  input  logic data_in,     // serial information bits
  input  logic tap_in,      // tap of the last stage register
  input  logic fb_in,       // feedback line, from the first chip's fb_out
  output logic fb_out,      // (data_in & fb_en) ^ tap_in
  output logic fb_gated,    // fb_in & fb_en, to the multipliers
  output logic fb_dly_out   // fb_gated delayed by J bit clocks
);

  logic [J-1:0] dly_q;

  assign fb_out   = (data_in & fb_en) ^ tap_in;
  assign fb_gated = fb_in & fb_en;

  always_ff @(posedge clk) begin
    if (!rst_n) dly_q <= '0;
    else        dly_q <= {dly_q[J-2:0], fb_gated};
  end

  assign fb_dly_out = dly_q[J-1];

endmodule
