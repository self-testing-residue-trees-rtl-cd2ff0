// mod_add_orand - the +A cell in two-level OR-AND (product-of-sums) form,
// used for level merging.
//
// With Ybar^a meaning the OR of every Y line except Y^a, output k is
//     R^k = AND over j of ( X^j OR Ybar^((k-j) mod A) )
// Each output has A OR gates of A inputs (X^j and A-1 Y lines) feeding one
// A-input AND: A*A gates per cell. For 1-out-of-A inputs this gives the same
// modulo-A sum as the AND-OR cell, an all-zero input still gives an all-zero
// output and two lines high on one input still give two lines high out.
//
// Why it exists: the |x|_A blocks end in an OR level and the AND-OR cell ends
// in an OR level. Alternating OR-AND and AND-OR cells from layer to layer
// places two OR levels or two AND levels back to back at every layer
// boundary, and each such pair can be collapsed into one wider gate without
// losing the self-checking property, leaving about one gate delay per layer.
//
// Interface: x, y, r are A-bit code vectors, bit i = residue i.
// Timing: purely combinational.
//
// The product-of-sums form follows the described cell; the gate collapsing
// itself is left to synthesis.
module mod_add_orand #(
  parameter int unsigned A = 3  // modulus
) (
  input  logic [A-1:0] x,
  input  logic [A-1:0] y,
  output logic [A-1:0] r
);

  always_comb begin
    for (int unsigned k = 0; k < A; k++) begin
      r[k] = 1'b1;
      for (int unsigned j = 0; j < A; j++) begin
        logic term;
        term = x[j];
        for (int unsigned m = 0; m < A; m++)
          if (m != (k + A - j) % A) term = term | y[m];
        r[k] = r[k] & term;
      end
    end
  end

endmodule
