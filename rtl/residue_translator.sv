// residue_translator - converts a pair of residues, modulo P and modulo Q,
// into one residue modulo A, where A divides the least common multiple
// L = lcm(P, Q). The default is A = P*Q with P and Q relatively prime.
//
// Every value v in 0..L-1 is fixed by its pair (v mod P, v mod Q), so the
// translator has one two-input AND term per value v, and each output line
// ORs the terms of the values that share its residue:
//     R^i = OR over v < L with v mod A = i of ( X^(v mod P) AND Y^(v mod Q) )
// Pairs that no value produces (possible when P and Q share a factor) get no
// gate. Each output line has its own terms, so a fault reaches one line only.
// When P and Q are relatively prime and A = P*Q, L = A and every line is a
// single AND gate. With two valid inputs exactly one term fires. An all-zero
// input gives an all-zero output. In the coprime product case, k lines high
// on one input give k lines high out. So non-code words from either residue
// tree stay non-code. In the general case this holds only for the pairs that
// terms exist for, and must be checked for the chosen P, Q and A.
//
// Interface: x (P lines, mod-P residue), y (Q lines, mod-Q residue),
// r (A lines, r[i] = 1 iff the combined residue is i).
// Timing: purely combinational; one AND level, plus an OR level when L > A.
//
// Follows the described translator: A disjoint two-level AND-OR networks,
// reducing to one AND gate per line for relatively prime moduli whose
// product is A. Reading "the least common multiple equals or exceeds A" as
// "A divides the least common multiple" is this design's choice: only then
// is the mod-A residue fixed by the two smaller ones. Only two moduli are
// combined here.
module residue_translator #(
  parameter int unsigned P = 3,      // first modulus
  parameter int unsigned Q = 5,      // second modulus
  parameter int unsigned A = P * Q   // output modulus, a divisor of lcm(P, Q)
) (
  input  logic [P-1:0] x,
  input  logic [Q-1:0] y,
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

  localparam int unsigned L = P / gcd(P, Q) * Q;  // lcm(P, Q)

  always_comb begin
    r = '0;
    for (int unsigned v = 0; v < L; v++) begin
      r[v % A] = r[v % A] | (x[v % P] & y[v % Q]);
    end
  end

  initial begin
    assert (L % A == 0) else $error("residue_translator: A=%0d does not divide lcm(%0d,%0d)=%0d", A, P, Q, L);
  end

endmodule
