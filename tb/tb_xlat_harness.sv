// tb_xlat_harness - exercises one residue_translator with every pair of code
// words. A pair that some value v < lcm(P, Q) produces must select line
// v mod A alone; any other pair must give all-zero. An all-zero input must
// give all-zero, every output line must be reachable, and the output for a
// two-hot input must be the OR of the outputs for its two lines. When P and
// Q are relatively prime and A = P*Q, that two-hot output must have two
// lines high.
module tb_xlat_harness #(
  parameter int unsigned P = 3,
  parameter int unsigned Q = 5,
  parameter int unsigned A = P * Q
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [P-1:0] x;
  logic [Q-1:0] y;
  logic [A-1:0] r;

  residue_translator #(.P(P), .Q(Q), .A(A)) dut (.x(x), .y(y), .r(r));

  // Value in 0..lcm-1 with the given residues, or -1 if none.
  function automatic int crt(int unsigned p, int unsigned q);
    for (int unsigned v = 0; v < P * Q; v++)
      if (v % P == p && v % Q == q) return int'(v);
    return -1;
  endfunction

  function automatic logic [A-1:0] expect_of(int unsigned p, int unsigned q);
    int v;
    v = crt(p, q);
    return (v < 0) ? '0 : (A'(1) << (v % A));
  endfunction

  task automatic chk(logic [A-1:0] exp, string what);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL translator P=%0d Q=%0d A=%0d %s: x=%b y=%b r=%b expected %b",
               P, Q, A, what, x, y, r, exp);
    end
  endtask

  initial begin
    logic [A-1:0] seen;
    checks = 0; failures = 0; done = 0; seen = '0;
    #1;
    for (int unsigned p = 0; p < P; p++) begin
      for (int unsigned q = 0; q < Q; q++) begin
        x = P'(1) << p; y = Q'(1) << q;
        #1;
        chk(expect_of(p, q), "code pair");
        seen |= r;
      end
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("FAIL translator P=%0d Q=%0d A=%0d: lines never reached %b", P, Q, A, ~seen);
    end
    for (int unsigned q = 0; q < Q; q++) begin
      x = '0; y = Q'(1) << q; #1;
      chk('0, "X all-zero");
    end
    for (int unsigned p = 0; p < P; p++) begin
      x = P'(1) << p; y = '0; #1;
      chk('0, "Y all-zero");
    end
    for (int unsigned p = 0; p + 1 < P; p++) begin
      for (int unsigned q = 0; q < Q; q++) begin
        x = (P'(1) << p) | (P'(1) << (p + 1)); y = Q'(1) << q; #1;
        chk(expect_of(p, q) | expect_of(p + 1, q), "X two-hot");
        if (P * Q == A) begin
          checks++;
          if ($countones(r) != 2) begin
            failures++;
            $display("FAIL translator P=%0d Q=%0d: X two-hot gave %b", P, Q, r);
          end
        end
      end
    end
    for (int unsigned q = 0; q + 1 < Q; q++) begin
      for (int unsigned p = 0; p < P; p++) begin
        x = P'(1) << p; y = (Q'(1) << q) | (Q'(1) << (q + 1)); #1;
        chk(expect_of(p, q) | expect_of(p, q + 1), "Y two-hot");
        if (P * Q == A) begin
          checks++;
          if ($countones(r) != 2) begin
            failures++;
            $display("FAIL translator P=%0d Q=%0d: Y two-hot gave %b", P, Q, r);
          end
        end
      end
    end
    done = 1;
  end
endmodule
