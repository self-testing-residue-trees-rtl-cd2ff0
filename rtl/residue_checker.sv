// residue_checker - residue check of an addition built from totally
// self-checking residue generators.
//
// Checks n1 + n2 = sum by testing |n1|_A +_A |n2|_A = |sum|_A, which holds
// for any adder working modulo M when A divides M. Any adder error that is
// not a multiple of A breaks the equality.
//
// Structure:
//   * Three residue generators R(n1), R(n2), R(sum). With Q = 1 each is a
//     residue_tree modulo A = P; with Q > 1 each is a biresidue_tree modulo
//     A = P*Q (modulo-P and modulo-Q trees plus translator).
//   * A +A cell (mod_add_andor) adds |n1|_A and |n2|_A.
//   * eq_checker compares that (X) with |sum|_A (Y).
// A fault in R(n1), R(n2) or the +A cell makes X non-code for some inputs; a
// fault in R(sum) makes Y non-code; an adder error makes X and Y different
// code words. The EQ output leaves {01, 10} for an adder error and for a
// non-code word with no line high; the simple eq_checker used here can miss
// a non-code word that still contains the correct line (see eq_checker).
//
// Interface: n1, n2, sum (WIDTH bits); res_n1, res_n2, res_sum, res_add
// (A lines each, the intermediate residues); eq_out (2 wires, 01/10 = pass,
// 00/11 = error).
// Timing: purely combinational.
//
// The arrangement follows the described addition checker. Using the
// modulo-15 biresidue generator by default (the modulus for which the text
// says a self-checking EQ is possible) is this implementation's choice.
module residue_checker
  import residue_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned P           = 3,
  parameter int unsigned Q           = 5,   // 1: single residue tree modulo P
  parameter int unsigned BYTE_W_P    = 4,
  parameter int unsigned BYTE_W_Q    = 3,
  parameter bit          LEVEL_MERGE = 1'b0,
  localparam int unsigned A          = P * Q
) (
  input  logic [WIDTH-1:0] n1,
  input  logic [WIDTH-1:0] n2,
  input  logic [WIDTH-1:0] sum,
  output logic [A-1:0]     res_n1,
  output logic [A-1:0]     res_n2,
  output logic [A-1:0]     res_sum,
  output logic [A-1:0]     res_add,
  output logic [1:0]       eq_out
);

  logic [WIDTH-1:0] opnd [3];
  logic [A-1:0]     res  [3];

  assign opnd[0] = n1;
  assign opnd[1] = n2;
  assign opnd[2] = sum;

  for (genvar g = 0; g < 3; g++) begin : g_gen
    if (Q == 1) begin : g_single
      residue_tree #(.WIDTH(WIDTH), .A(P), .BYTE_W(BYTE_W_P), .LEVEL_MERGE(LEVEL_MERGE))
        u_gen (.n(opnd[g]), .r(res[g]));
    end else begin : g_bires
      biresidue_tree #(.WIDTH(WIDTH), .P(P), .Q(Q), .BYTE_W_P(BYTE_W_P),
                       .BYTE_W_Q(BYTE_W_Q), .LEVEL_MERGE(LEVEL_MERGE))
        u_gen (.n(opnd[g]), .r(res[g]));
    end
  end

  assign res_n1  = res[0];
  assign res_n2  = res[1];
  assign res_sum = res[2];

  mod_add_andor #(.A(A)) u_add (.x(res[0]), .y(res[1]), .r(res_add));

  eq_checker #(.A(A)) u_eq (.x(res_add), .y(res_sum), .z(eq_out));

endmodule
