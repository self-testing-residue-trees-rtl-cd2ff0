// mod_add_andor - the +A cell in two-level AND-OR form.
//
// Adds two 1-out-of-A coded residues X and Y modulo A:
//     R^i = OR over j of ( X^j AND Y^((i-j) mod A) )
// There are A*A two-input AND terms, one per residue pair, and A output ORs
// of A inputs each. Because the inputs are 1-out-of-A coded no inverters are
// needed, and every output line is built from its own gates. Consequences
// used by the self-checking argument: an all-zero input gives an all-zero
// output, and k lines high on one input (with a valid other input) gives k
// lines high on the output, so non-code words propagate to the tree output.
//
// Interface: x, y, r are A-bit code vectors, bit i = residue i.
// Timing: purely combinational (two gate levels).
//
// The equations are the ones the design gives; the module is generic in A.
module mod_add_andor #(
  parameter int unsigned A = 3  // modulus
) (
  input  logic [A-1:0] x,
  input  logic [A-1:0] y,
  output logic [A-1:0] r
);

  always_comb begin
    for (int unsigned i = 0; i < A; i++) begin
      r[i] = 1'b0;
      for (int unsigned j = 0; j < A; j++) r[i] = r[i] | (x[j] & y[(i + A - j) % A]);
    end
  end

endmodule
