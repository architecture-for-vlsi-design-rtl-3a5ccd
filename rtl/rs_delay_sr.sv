// rs_delay_sr: one stage register of the interleaved encoder, an I x J bit
// serial shift register (40 bits for I = 5, J = 8).
//
// Each bit clock shifts din into the least significant end. dout is the most
// significant bit (delay LEN clocks) and feeds the next stage's adder. tap is
// the bit TAP clocks after entry ((I-1) x J = 32 for the defaults); on the
// stage nearest the encoder output it supplies the feedback and the parity
// output one symbol earlier than dout, compensating the one-symbol delay of
// the serial multipliers. On other stages tap is unused.
// Synchronous active-low reset clears the register (reset is this design's
// addition; consecutive code blocks need none because the parity read-out
// flushes the stages with zeros).
module rs_delay_sr #(
  parameter int unsigned LEN = 40,
  parameter int unsigned TAP = 32     // 0 <= TAP <= LEN
) (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic dout,   // din delayed by LEN bit clocks
  output logic tap     // din delayed by TAP bit clocks
);

  logic [LEN-1:0] sr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) sr_q <= '0;
    else        sr_q <= {sr_q[LEN-2:0], din};
  end

  assign dout = sr_q[LEN-1];

  if (TAP == 0) begin : g_tap0
    assign tap = din;
  end else begin : g_tapn
    assign tap = sr_q[TAP-1];
  end

endmodule
