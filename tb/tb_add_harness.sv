// tb_add_harness - exercises one +A cell (AND-OR when ORAND = 0, OR-AND when
// ORAND = 1) with all A*A pairs of code words, and with the non-code inputs
// the self-checking argument relies on: an all-zero operand must give an
// all-zero output, and an operand with two lines high (the other operand a
// code word) must give a non-code output: exactly the two corresponding sums
// high, except for the OR-AND cell with two Y lines high, where all A lines
// rise.
module tb_add_harness #(
  parameter int unsigned A     = 3,
  parameter bit          ORAND = 1'b0
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [A-1:0] x, y, r;

  if (ORAND) begin : g_oa
    mod_add_orand #(.A(A)) dut (.x(x), .y(y), .r(r));
  end else begin : g_ao
    mod_add_andor #(.A(A)) dut (.x(x), .y(y), .r(r));
  end

  function automatic logic [A-1:0] code(int unsigned v);
    return A'(1) << (v % A);
  endfunction

  task automatic expect_r(logic [A-1:0] exp, string what);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL +%0d (%s) %s: x=%b y=%b r=%b expected %b",
               A, ORAND ? "OR-AND" : "AND-OR", what, x, y, r, exp);
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    // Normal operation: every pair of residues.
    for (int unsigned i = 0; i < A; i++)
      for (int unsigned j = 0; j < A; j++) begin
        x = code(i); y = code(j); #1;
        expect_r(code(i + j), "code pair");
      end
    // All-zero operand on either side.
    for (int unsigned j = 0; j < A; j++) begin
      x = '0; y = code(j); #1; expect_r('0, "X all-zero");
      x = code(j); y = '0; #1; expect_r('0, "Y all-zero");
    end
    // Two lines high on one operand.
    for (int unsigned i = 0; i < A; i++)
      for (int unsigned e = 1; e < A; e++)
        for (int unsigned j = 0; j < A; j++) begin
          x = code(i) | code(i + e); y = code(j); #1;
          expect_r(code(i + j) | code(i + e + j), "X two-hot");
          y = code(i) | code(i + e); x = code(j); #1;
          // AND-OR: exactly the two sums. OR-AND: every OR term sees a high
          // Y line (each omits only one Y line), so all A outputs go high.
          // Both are non-code words, which is what the checking needs.
          if (ORAND) expect_r('1, "Y two-hot");
          else       expect_r(code(i + j) | code(i + e + j), "Y two-hot");
        end
    done = 1;
  end
endmodule
