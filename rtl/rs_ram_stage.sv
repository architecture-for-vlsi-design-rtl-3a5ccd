// rs_ram_stage: RAM replacement for one stage shift register, with the
// interleaving level selectable at run time.
//
// A 1-bit wide RAM of I_MAX x J words and a circular address pointer imitate
// a shift register of L = ilevel x J bits: in each bit clock the word at the
// pointer is read (dout, written L clocks earlier) and then overwritten with
// din at the same address (write after read), and the pointer advances
// modulo L. A second read port at pointer + J (mod L) gives tap, the bit
// written (ilevel-1) x J clocks earlier; with ilevel = 1 the tap is din
// itself. Reading and writing in the same clock edge is this design's
// simplification of the two RAM accesses per bit time.
//
// Reset (synchronous, active low, this design's addition): the pointer
// returns to 0 and, while rst_n is low, a clearing counter sweeps the whole
// RAM writing zeros, so rst_n must be held low for at least I_MAX x J clocks
// to clear the stage. ilevel (1 .. I_MAX)
// may only change while rst_n is low.
module rs_ram_stage #(
  parameter int unsigned J     = 8,
  parameter int unsigned I_MAX = 5,
  localparam int unsigned DEPTH = I_MAX * J,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LW    = $clog2(I_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [LW-1:0] ilevel,   // interleaving level 1 .. I_MAX
  input  logic          din,
  output logic          dout,     // din delayed ilevel x J clocks
  output logic          tap       // din delayed (ilevel-1) x J clocks
);

  logic          mem [DEPTH];
  logic [AW-1:0] ptr_q, clr_q, tap_addr, last;
  logic [AW:0]   tsum;

  // last valid address of the active length
  assign last     = AW'(int'(ilevel) * int'(J) - 1);
  assign tsum     = {1'b0, ptr_q} + (AW + 1)'(J);
  assign tap_addr = (tsum > {1'b0, last}) ? AW'(tsum - {1'b0, last} - 1'b1) : AW'(tsum);

  assign dout = mem[ptr_q];
  assign tap  = (ilevel <= LW'(1)) ? din : mem[tap_addr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem[clr_q] <= 1'b0;
      clr_q      <= (clr_q >= AW'(DEPTH - 1)) ? '0 : clr_q + 1'b1;
      ptr_q      <= '0;
    end else begin
      mem[ptr_q] <= din;
      ptr_q      <= (ptr_q >= last) ? '0 : ptr_q + 1'b1;
    end
  end

endmodule
