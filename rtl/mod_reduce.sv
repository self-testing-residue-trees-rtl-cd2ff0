// mod_reduce - the |x|_A block: first-rank cell of a residue tree.
//
// Produces |B * 2^SHIFT|_A, in the 1-out-of-A code, for a W-bit byte B that
// sits at bit position SHIFT of the input number. A must be odd.
//
// How it works (the structure the residue-tree design prescribes):
//   1. The byte is decoded completely: one W-input AND term per value v, so
//      exactly one of the 2^W decoder lines is high.
//   2. Decoder lines whose values share a residue are ORed together, giving
//      the unweighted residue |B|_A on A lines u.
//   3. Multiplying by the byte weight |2^SHIFT|_A permutes the residues (for
//      odd A the multiplication is one-to-one), so it costs no gates: line
//      u[k] is simply wired to output r[(k * |2^SHIFT|_A) mod A].
// Each output line has its own decode terms, so a single stuck line inside
// the block can disturb only one output line, except the input inverters,
// whose faults yield two or zero output lines high.
//
// Interface: x (W bits, the byte), r (A lines, r[i] = 1 iff the weighted
// residue is i). W must be at least ceil(log2 A) for every residue to occur.
// Timing: purely combinational.
//
// The decode-then-OR structure and the crossover multiplication follow the
// described design; expressing the decode as comparisons (the tools choose
// the gates) is this implementation's choice.
module mod_reduce
  import residue_pkg::*;
#(
  parameter int unsigned A     = 3,  // odd modulus
  parameter int unsigned W     = 4,  // byte width in bits
  parameter int unsigned SHIFT = 0   // bit position of the byte's LSB
) (
  input  logic [W-1:0] x,
  output logic [A-1:0] r
);

  localparam int unsigned NV = 2 ** W;
  localparam int unsigned S  = pow2_mod(SHIFT, A);  // weight residue

  logic [NV-1:0] dec;  // 1-out-of-2^W decoder lines
  logic [A-1:0]  u;    // unweighted residue |B|_A

  always_comb begin
    for (int unsigned v = 0; v < NV; v++) dec[v] = (x == W'(v));
  end

  always_comb begin
    u = '0;
    for (int unsigned v = 0; v < NV; v++) u[v % A] = u[v % A] | dec[v];
  end

  // Wire crossover: multiplication by the byte weight modulo A.
  for (genvar k = 0; k < A; k++) begin : g_cross
    assign r[(k * S) % A] = u[k];
  end

  initial begin
    assert (A % 2 == 1) else $error("mod_reduce: modulus A=%0d must be odd", A);
    assert (NV >= A) else $error("mod_reduce: W=%0d bits cannot show all residues of %0d", W, A);
  end

endmodule
