// tb_biresidue_tree - checks the modulo-15 network (modulo-3 tree, modulo-5
// tree, translator) on all 65536 16-bit inputs against n mod 15, including
// its two intermediate codes, and that all 15 output residues occur. A
// 32-bit instance is checked on random numbers. A network with moduli that
// share a factor (a modulo-15 tree and a modulo-21 tree giving the residue
// modulo 35) is checked on all 16-bit inputs.
module tb_biresidue_tree;
  int checks, failures;

  logic [15:0] n;
  logic [14:0] r;
  logic [31:0] n32;
  logic [14:0] r32;

  biresidue_tree dut (.n(n), .r(r));
  biresidue_tree #(.WIDTH(32)) dut32 (.n(n32), .r(r32));

  logic [34:0] r35;
  biresidue_tree #(.P(15), .Q(21), .A(35), .BYTE_W_P(4), .BYTE_W_Q(5)) dut35 (.n(n), .r(r35));

  task automatic chk(logic [14:0] got, int unsigned expv, string what);
    checks++;
    if (got !== (15'(1) << expv)) begin
      failures++;
      if (failures < 10) $display("FAIL biresidue %s: n=%0h got %b expected residue %0d", what, n, got, expv);
    end
  endtask

  initial begin : watchdog
    #10000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [14:0] seen;
    checks = 0; failures = 0; seen = '0;
    for (int v = 0; v < 65536; v++) begin
      n = 16'(v);
      #1;
      chk(r, v % 15, "mod 15");
      chk(15'(dut.rp), v % 3, "mod 3 tree");
      chk(15'(dut.rq), v % 5, "mod 5 tree");
      seen |= r;
      checks++;
      if (r35 !== (35'(1) << (v % 35))) begin
        failures++;
        if (failures < 10) $display("FAIL biresidue mod 35: n=%0h got %b", n, r35);
      end
    end
    checks++;
    if (seen != '1) begin failures++; $display("FAIL not all residues seen: %b", seen); end
    for (int t = 0; t < 5000; t++) begin
      n32 = $urandom;
      #1;
      chk(r32, n32 % 15, "32-bit mod 15");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
