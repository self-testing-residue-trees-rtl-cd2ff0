// residue_translator3 - converts three residues, modulo P, Q and S, into one
// residue modulo A, where A divides the least common multiple
// L = lcm(P, Q, S). The default combines moduli 3, 5 and 7 into 105.
//
// Every value v in 0..L-1 is fixed by its triple of residues, so the
// translator has one three-input AND term per value v, and each output line
// ORs the terms of the values that share its residue:
//     R^i = OR over v < L with v mod A = i of
//           ( X^(v mod P) AND Y^(v mod Q) AND Z^(v mod S) )
// When the moduli are pairwise relatively prime and A = P*Q*S, L = A and
// every line is a single AND gate. Each line has its own terms, so a fault
// reaches one line only. With three valid inputs exactly one term fires; an
// all-zero input gives an all-zero output; in the pairwise-prime product case
// k lines high on one input give k lines high out, so non-code words from any
// of the three residue trees stay non-code.
//
// Interface: x (P lines), y (Q lines), z (S lines), each a 1-out-of-N
// residue; r (A lines, r[i] = 1 iff the combined residue is i).
// Timing: purely combinational; one AND level, plus an OR level when L > A.
//
// Follows the described translator for more than two residue trees (A
// disjoint two-level AND-OR networks, single AND gates for relatively prime
// moduli whose product is A). As for two moduli, requiring that A divide the
// least common multiple is this design's reading of the condition.
module residue_translator3 #(
  parameter int unsigned P = 3,          // first modulus
  parameter int unsigned Q = 5,          // second modulus
  parameter int unsigned S = 7,          // third modulus
  parameter int unsigned A = P * Q * S   // output modulus, a divisor of lcm(P, Q, S)
) (
  input  logic [P-1:0] x,
  input  logic [Q-1:0] y,
  input  logic [S-1:0] z,
  output logic [A-1:0] r
);

  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    while (b != 0) begin
      int unsigned t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  localparam int unsigned LPQ = P / gcd(P, Q) * Q;        // lcm(P, Q)
  localparam int unsigned L   = LPQ / gcd(LPQ, S) * S;    // lcm(P, Q, S)

  always_comb begin
    r = '0;
    for (int unsigned v = 0; v < L; v++) begin
      r[v % A] = r[v % A] | (x[v % P] & y[v % Q] & z[v % S]);
    end
  end

  initial begin
    assert (L % A == 0) else $error("residue_translator3: A=%0d does not divide lcm(%0d,%0d,%0d)=%0d", A, P, Q, S, L);
  end

endmodule
