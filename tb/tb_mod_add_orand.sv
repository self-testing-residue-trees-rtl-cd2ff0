// tb_mod_add_orand - self-checking test of the OR-AND +A cell for the moduli
// 3, 5, 7 and 15: all code-word pairs, plus all-zero and two-hot operands,
// whose propagation as non-code words the self-checking property needs.
module tb_mod_add_orand;
  localparam int N = 4;
  int c [N];
  int f [N];
  bit d [N];

  tb_add_harness #(.A(3),  .ORAND(1'b1)) h0 (c[0], f[0], d[0]);
  tb_add_harness #(.A(5),  .ORAND(1'b1)) h1 (c[1], f[1], d[1]);
  tb_add_harness #(.A(7),  .ORAND(1'b1)) h2 (c[2], f[2], d[2]);
  tb_add_harness #(.A(15), .ORAND(1'b1)) h3 (c[3], f[3], d[3]);

  int checks, failures;

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1;
      all = 1;
      foreach (d[i]) all &= d[i];
    end while (!all);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
