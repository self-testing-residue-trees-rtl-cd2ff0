// tb_residue_checker - checks the addition checker alone, with the sum
// supplied by the testbench:
//   * correct one's complement sums must pass (eq_out 01 or 10, both seen);
//   * sums off by an amount d that is not a multiple of A must be flagged
//     (eq_out 00 or 11);
//   * sums off by a multiple of A are invisible to a residue check and must
//     pass, which shows the check is exactly "modulo A";
//   * the intermediate residues must equal n1, n2, sum mod A and their sum.
// Runs the default modulo-15 (3 x 5) checker and a single-tree modulo-3 one.
module tb_residue_checker;
  int checks, failures;
  int n_pass01, n_pass10, n_detect, n_alias;

  logic [15:0] n1, n2, sum;
  logic [14:0] rn1, rn2, rsum, radd;
  logic [1:0]  eq15;
  logic [2:0]  sn1, sn2, ssum, sadd;
  logic [1:0]  eq3;

  residue_checker dut (.n1(n1), .n2(n2), .sum(sum), .res_n1(rn1), .res_n2(rn2),
                       .res_sum(rsum), .res_add(radd), .eq_out(eq15));
  residue_checker #(.P(3), .Q(1)) dut3 (.n1(n1), .n2(n2), .sum(sum), .res_n1(sn1),
                       .res_n2(sn2), .res_sum(ssum), .res_add(sadd), .eq_out(eq3));

  function automatic logic [15:0] ones_add(logic [15:0] a, logic [15:0] b);
    int unsigned t;
    t = int'(a) + int'(b);
    return (t > 65535) ? 16'(t - 65535) : 16'(t);
  endfunction

  task automatic apply(logic [15:0] a, logic [15:0] b, int unsigned d);
    bit good15, good3;
    n1 = a; n2 = b;
    sum = ones_add(ones_add(a, b), 16'(d));  // d = 0: correct sum
    #1;
    // Independent reference: residues of the values actually presented.
    good15 = ((int'(n1) + int'(n2)) % 15) == (int'(sum) % 15);
    good3  = ((int'(n1) + int'(n2)) % 3)  == (int'(sum) % 3);
    checks += 6;
    if (rn1 !== 15'(1) << (n1 % 15) || rn2 !== 15'(1) << (n2 % 15) ||
        rsum !== 15'(1) << (sum % 15) || radd !== 15'(1) << ((int'(n1) + int'(n2)) % 15)) begin
      failures++;
      $display("FAIL residues n1=%h n2=%h sum=%h", n1, n2, sum);
    end
    if ((eq15 == 2'b01 || eq15 == 2'b10) !== good15) begin
      failures++;
      $display("FAIL mod-15 verdict n1=%h n2=%h sum=%h eq=%b", n1, n2, sum, eq15);
    end
    if ((eq3 == 2'b01 || eq3 == 2'b10) !== good3) begin
      failures++;
      $display("FAIL mod-3 verdict n1=%h n2=%h sum=%h eq=%b", n1, n2, sum, eq3);
    end
    if (d == 0 && !good15) begin
      failures++;
      $display("FAIL reference: correct sum not congruent");
    end
    if (d % 15 != 0 && good15) begin
      failures++;
      $display("FAIL reference: error d=%0d not detected mod 15", d);
    end
    if (d != 0 && d % 15 == 0 && !good15) begin
      failures++;
      $display("FAIL reference: multiple of 15 should alias");
    end
    if (eq15 == 2'b01) n_pass01++;
    if (eq15 == 2'b10) n_pass10++;
    if (d != 0 && (eq15 == 2'b00 || eq15 == 2'b11)) n_detect++;
    if (d != 0 && (eq15 == 2'b01 || eq15 == 2'b10)) n_alias++;
  endtask

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; n_pass01 = 0; n_pass10 = 0; n_detect = 0; n_alias = 0;
    for (int i = 0; i < 5000; i++) apply(16'($urandom), 16'($urandom), 0);
    for (int i = 0; i < 3000; i++) apply(16'($urandom), 16'($urandom), 1 + $urandom_range(0, 20000));
    for (int i = 0; i < 500; i++)  apply(16'($urandom), 16'($urandom), 15 * (1 + $urandom_range(0, 100)));
    // Single-bit adder errors: 2^k is never a multiple of 15.
    for (int k = 0; k < 16; k++) apply(16'($urandom), 16'($urandom), 1 << k);
    checks += 3;
    if (n_pass01 == 0 || n_pass10 == 0) begin failures++; $display("FAIL pass codes not both seen"); end
    if (n_detect == 0) begin failures++; $display("FAIL no error detected"); end
    if (n_alias == 0) begin failures++; $display("FAIL no aliasing case"); end
    $display("passes 01=%0d 10=%0d, detected=%0d, aliased=%0d", n_pass01, n_pass10, n_detect, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
