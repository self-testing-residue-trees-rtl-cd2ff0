// checked_adder_top - one's complement adder with a residue checker modulo
// 15 built from totally self-checking residue generators.
//
// The adder (ones_adder) computes sum = n1 + n2 modulo 2^WIDTH - 1. The
// checker (residue_checker) extracts the modulo-15 residues of n1, n2 and sum
// with biresidue networks (a modulo-3 tree on 4-bit bytes and a modulo-5 tree
// on 3-bit bytes, combined by a translator), adds the two operand residues
// with a +15 cell and compares the result with the residue of the sum. The
// 2-wire eq_out is 01 or 10 while adder and checker agree; 00 or 11 flags an
// adder error, or a checker fault that empties a residue code word (faults
// that add a line are not all caught by the simple eq_checker). err is the
// decode of eq_out.
//
// With LEVEL_MERGE = 1 (the default) the residue trees alternate OR-AND and
// AND-OR +A layers, the arrangement that lets adjacent gate levels merge.
//
// Interface: n1, n2 (WIDTH bits) in; sum (WIDTH bits), eac (end-around carry
// occurred), the four intermediate 1-out-of-15 residues, eq_out and err out.
// Timing: purely combinational; no clock or reset.
//
// Adder type and width (16 bits, 65535 divisible by 15) are this
// implementation's choices; the checker arrangement follows the described one.
module checked_adder_top
  import residue_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned P           = 3,
  parameter int unsigned Q           = 5,
  parameter int unsigned BYTE_W_P    = 4,
  parameter int unsigned BYTE_W_Q    = 3,
  parameter bit          LEVEL_MERGE = 1'b1,
  localparam int unsigned A          = P * Q
) (
  input  logic [WIDTH-1:0] n1,
  input  logic [WIDTH-1:0] n2,
  output logic [WIDTH-1:0] sum,
  output logic             eac,
  output logic [A-1:0]     res_n1,
  output logic [A-1:0]     res_n2,
  output logic [A-1:0]     res_sum,
  output logic [A-1:0]     res_add,
  output logic [1:0]       eq_out,
  output logic             err
);

  ones_adder #(.WIDTH(WIDTH)) u_adder (.a(n1), .b(n2), .s(sum), .eac(eac));

  residue_checker #(
    .WIDTH(WIDTH), .P(P), .Q(Q), .BYTE_W_P(BYTE_W_P), .BYTE_W_Q(BYTE_W_Q),
    .LEVEL_MERGE(LEVEL_MERGE)
  ) u_check (
    .n1(n1), .n2(n2), .sum(sum),
    .res_n1(res_n1), .res_n2(res_n2), .res_sum(res_sum), .res_add(res_add),
    .eq_out(eq_out)
  );

  assign err = ~(eq_out[1] ^ eq_out[0]);

  initial begin
    assert (((2 ** WIDTH) - 1) % A == 0)
      else $error("checked_adder_top: A=%0d does not divide 2^%0d-1", A, WIDTH);
  end

endmodule
