// eq_checker - compares two 1-out-of-A coded residues, 2-wire output.
//
// The residues are split into two classes, even and odd residue numbers.
//     z[0] = OR over even i of ( X^i AND Y^i )
//     z[1] = OR over odd  i of ( X^i AND Y^i )
// Two equal code words raise exactly one of the two wires (01 or 10; both
// appear as the residue varies). Two different code words, or an all-zero
// input, give 00. So 01 and 10 mean "equal", 00 and 11 mean "error".
// An input with extra lines high is flagged only when none of its lines
// matches the other input, or when the matches fall in both classes (11):
// a word with one extra line next to the correct one, facing the correct
// code word, still reads as "equal".
//
// Interface: x, y (A lines each), z (2 wires).
// Timing: purely combinational, two gate levels.
//
// Only the role of this comparator, its 1-out-of-A inputs and its 2-wire
// output are given; the even/odd split is this implementation's own simple
// choice. It catches differing code words (adder errors) and lost lines,
// but not every extra line, and it is not itself totally self-checking.
module eq_checker #(
  parameter int unsigned A = 15
) (
  input  logic [A-1:0] x,
  input  logic [A-1:0] y,
  output logic [1:0]   z
);

  always_comb begin
    z = 2'b00;
    for (int unsigned i = 0; i < A; i++) z[i % 2] = z[i % 2] | (x[i] & y[i]);
  end

endmodule
