// tb_checked_adder_top - end-to-end test of the checked one's complement
// adder at its default size (16 bits, modulo-15 check, level-merged trees).
//
// Part 1 drives random and corner operand pairs and requires the sum to be
// right and the checker to pass (eq_out 01 or 10, err 0). Part 2 overrides
// the adder's result with a wrong value (as a faulty adder would produce) and
// requires err whenever the error is not a multiple of 15. Each mechanism must
// occur at least once: end-around carry, no carry, negative zero (all-ones
// sum), both pass codes 01 and 10, all 15 residues of the sum, an adder error
// detected, and an error that aliases (multiple of 15) and passes.
module tb_checked_adder_top;
  int checks, failures;

  logic [15:0] n1, n2, sum;
  logic        eac, err;
  logic [14:0] res_n1, res_n2, res_sum, res_add;
  logic [1:0]  eq_out;

  checked_adder_top dut (.n1(n1), .n2(n2), .sum(sum), .eac(eac), .res_n1(res_n1),
                         .res_n2(res_n2), .res_sum(res_sum), .res_add(res_add),
                         .eq_out(eq_out), .err(err));

  int n_eac, n_noeac, n_negzero, n_p01, n_p10, n_detect, n_alias;
  logic [14:0] seen_res;

  function automatic logic [15:0] ones_add(logic [15:0] a, logic [15:0] b);
    int unsigned t;
    t = int'(a) + int'(b);
    return (t > 65535) ? 16'(t - 65535) : 16'(t);
  endfunction

  task automatic apply(logic [15:0] a, logic [15:0] b);
    logic [15:0] exps;
    n1 = a; n2 = b;
    #1;
    exps = ones_add(a, b);
    checks += 3;
    if (sum !== exps) begin
      failures++;
      $display("FAIL sum %h + %h = %h expected %h", a, b, sum, exps);
    end
    if (err !== 1'b0 || !(eq_out == 2'b01 || eq_out == 2'b10)) begin
      failures++;
      $display("FAIL false alarm %h + %h: eq_out=%b err=%b", a, b, eq_out, err);
    end
    if (res_sum !== 15'(1) << (exps % 15)) begin
      failures++;
      $display("FAIL residue of sum %h: %b", exps, res_sum);
    end
    if (eac) n_eac++; else n_noeac++;
    if (sum == 16'hFFFF) n_negzero++;
    if (eq_out == 2'b01) n_p01++;
    if (eq_out == 2'b10) n_p10++;
    seen_res |= res_sum;
  endtask

  task automatic apply_bad(logic [15:0] a, logic [15:0] b, logic [15:0] bad);
    bit detectable;
    n1 = a; n2 = b;
    force dut.sum = bad;
    #1;
    detectable = ((int'(a) + int'(b)) % 15) != (int'(bad) % 15);
    checks++;
    if (err !== detectable) begin
      failures++;
      $display("FAIL injected sum %h for %h + %h: err=%b expected %b", bad, a, b, err, detectable);
    end
    if (detectable && err) n_detect++;
    if (!detectable && !err) n_alias++;
    release dut.sum;
    #1;
  endtask

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; seen_res = '0;
    n_eac = 0; n_noeac = 0; n_negzero = 0; n_p01 = 0; n_p10 = 0; n_detect = 0; n_alias = 0;
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'h0000);
    apply(16'h1234, 16'hEDCB);   // negative zero
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < 10000; i++) apply(16'($urandom), 16'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] a, b, good;
      a = 16'($urandom); b = 16'($urandom);
      good = ones_add(a, b);
      if (i % 4 == 0) apply_bad(a, b, good ^ (16'(1) << (i % 16)));   // one wrong bit
      else if (i % 4 == 1) apply_bad(a, b, ones_add(good, 16'(15 * (1 + i % 50)))); // alias
      else apply_bad(a, b, 16'($urandom));
    end
    checks += 8;
    if (n_eac == 0)     begin failures++; $display("FAIL end-around carry never occurred"); end
    if (n_noeac == 0)   begin failures++; $display("FAIL carry-free addition never occurred"); end
    if (n_negzero == 0) begin failures++; $display("FAIL negative zero never occurred"); end
    if (n_p01 == 0)     begin failures++; $display("FAIL pass code 01 never occurred"); end
    if (n_p10 == 0)     begin failures++; $display("FAIL pass code 10 never occurred"); end
    if (seen_res != '1) begin failures++; $display("FAIL not all residues: %b", seen_res); end
    if (n_detect == 0)  begin failures++; $display("FAIL no error detected"); end
    if (n_alias == 0)   begin failures++; $display("FAIL no aliasing error"); end
    $display("eac=%0d no-eac=%0d negzero=%0d pass01=%0d pass10=%0d detected=%0d aliased=%0d",
             n_eac, n_noeac, n_negzero, n_p01, n_p10, n_detect, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
