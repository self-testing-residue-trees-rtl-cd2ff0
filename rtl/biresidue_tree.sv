// biresidue_tree - residue generator modulo A (default P*Q) built from two smaller
// residue trees (a "biresidue" network).
//
// A single residue tree modulo A needs A-input OR gates in every +A cell,
// which becomes impractical for a large A. Here the input number feeds a
// modulo-P residue tree and a modulo-Q residue tree in parallel (P and Q odd,
// by default relatively prime) and a residue_translator turns the two small
// codes into the 1-out-of-A code. Each tree is totally self-checking and the
// translator passes non-code words on as non-code, so with relatively prime
// moduli the whole network is totally self-checking too. The default is the
// modulo-15 network built from a modulo-3 tree and a modulo-5 tree.
//
// The output modulus A defaults to P*Q. Any A that divides lcm(P, Q) may be
// given, with the moduli then allowed to share factors (see
// residue_translator).
//
// Interface: n (WIDTH bits), r (A lines, r[i] = 1 iff |n|_A = i).
// The intermediate codes are the internal signals rp (P lines) and rq.
// Timing: purely combinational; the translator adds one AND level (and an
// OR level when lcm(P, Q) > A).
//
// The structure follows the described modulo-15 network; the byte widths
// (4 bits for modulo 3, 3 bits for modulo 5) are the widths of the worked
// examples for those moduli.
module biresidue_tree
  import residue_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned P           = 3,
  parameter int unsigned Q           = 5,
  parameter int unsigned BYTE_W_P    = 4,
  parameter int unsigned BYTE_W_Q    = 3,
  parameter bit          LEVEL_MERGE = 1'b0,
  parameter int unsigned A           = P * Q
) (
  input  logic [WIDTH-1:0] n,
  output logic [A-1:0]     r
);

  logic [P-1:0] rp;  // 1-out-of-P residue
  logic [Q-1:0] rq;  // 1-out-of-Q residue

  residue_tree #(.WIDTH(WIDTH), .A(P), .BYTE_W(BYTE_W_P), .LEVEL_MERGE(LEVEL_MERGE))
    u_tree_p (.n(n), .r(rp));

  residue_tree #(.WIDTH(WIDTH), .A(Q), .BYTE_W(BYTE_W_Q), .LEVEL_MERGE(LEVEL_MERGE))
    u_tree_q (.n(n), .r(rq));

  residue_translator #(.P(P), .Q(Q), .A(A)) u_xlat (.x(rp), .y(rq), .r(r));

endmodule
