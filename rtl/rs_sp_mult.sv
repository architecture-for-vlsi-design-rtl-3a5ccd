// rs_sp_mult: serial-parallel GF(2^J) multiplier with an output serialiser.
//
// One operand (a generator coefficient) is applied J bits in parallel; the
// other (the feedback symbol) arrives one bit per bit clock, most significant
// bit first. A J-bit linear-feedback accumulator does Horner's rule,
// acc <- acc*alpha + b_k*coef, so after J bit clocks it holds coef*b.
// On the clock edge that ends the symbol (sym_end high, the J-th bit) the
// finished product is loaded in parallel into a J-bit output shift register
// and the accumulator restarts from zero. During the following symbol the
// output register shifts the product out MSB first on prod_bit.
//
// Timing: the product of the symbol whose bits arrive in bit clocks
// t .. t+J-1 appears on prod_bit in clocks t+J .. t+2J-1 (an inherent
// one-symbol delay). Changing FIELD_POLY to x^8+x^7+x^2+x+1 gives the
// alternative multiplier of the telemetry-standard parameter set.
// The LFSR-accumulator form and MSB-first order are this design's reading of
// a "linear feedback shift register type serial-parallel multiplier".
module rs_sp_mult #(
  parameter int unsigned J          = 8,
  parameter int unsigned FIELD_POLY = 32'h11D
) (
  input  logic         clk,
  input  logic         rst_n,     // synchronous, active low
  input  logic [J-1:0] coef,      // parallel operand
  input  logic         bit_in,    // serial operand, MSB first
  input  logic         sym_end,   // high during the last bit of each symbol
  output logic         prod_bit,  // serial product, MSB first, one symbol later
  output logic [J-1:0] product    // contents of the output register (for test)
);

  localparam logic [J-1:0] POLY_LOW = J'(FIELD_POLY);

  logic [J-1:0] acc_q, acc_d, out_q;

  always_comb begin
    acc_d = {acc_q[J-2:0], 1'b0} ^ (acc_q[J-1] ? POLY_LOW : '0) ^ (bit_in ? coef : '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      out_q <= '0;
    end else if (sym_end) begin
      acc_q <= '0;
      out_q <= acc_d;
    end else begin
      acc_q <= acc_d;
      out_q <= {out_q[J-2:0], 1'b0};
    end
  end

  assign prod_bit = out_q[J-1];
  assign product  = out_q;

endmodule
