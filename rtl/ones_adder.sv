// ones_adder - WIDTH-bit one's complement binary adder (end-around carry).
//
// This is the adder whose results the residue checker watches. A residue
// check modulo A is only sound when A divides the adder's own modulus M.
// A two's complement adder works modulo 2^WIDTH, which no odd A divides; a
// one's complement adder works modulo 2^WIDTH - 1 (65535 = 3*5*17*257 for 16
// bits), so odd moduli such as 3, 5 and 15 can check it.
//
// How it works: the two operands are added; the carry out of the top bit is
// added back in at the bottom (end-around carry). The second addition can
// never carry out again.
//
// Interface: a, b operands; s the sum modulo 2^WIDTH - 1 (all-ones and
// all-zeros both stand for zero); eac is 1 when an end-around carry occurred.
// Timing: purely combinational.
//
// The adder type follows from the checking condition; its internal carry
// structure (here left to synthesis) is not prescribed.
module ones_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             eac
);

  logic [WIDTH:0] raw;

  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    eac = raw[WIDTH];
    s   = raw[WIDTH-1:0] + WIDTH'(eac);
  end

endmodule
