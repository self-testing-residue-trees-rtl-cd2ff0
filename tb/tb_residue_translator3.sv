// tb_residue_translator3 - checks the three-modulus translator.
//   * Every triple of code words for (3,5,7) -> 105 and for (3,5,9) -> 45
//     (moduli sharing a factor): a triple some value v < lcm produces must
//     select line v mod A alone, any other triple must give all-zero, and
//     every output line must be reached.
//   * An all-zero input on any of the three ports gives all-zero, and for
//     (3,5,7) a two-hot input on any port gives two lines high.
//   * A 16-bit network of modulo-3, modulo-5 and modulo-7 residue trees
//     feeding the translator must give n mod 105 for every input.
module tb_residue_translator3;
  int checks, failures;

  logic [2:0]   x;
  logic [4:0]   y;
  logic [6:0]   z7;
  logic [8:0]   z9;
  logic [104:0] r105;
  logic [44:0]  r45;

  residue_translator3 dut105 (.x(x), .y(y), .z(z7), .r(r105));
  residue_translator3 #(.S(9), .A(45)) dut45 (.x(x), .y(y), .z(z9), .r(r45));

  // Network: three trees and the translator.
  logic [15:0]  n;
  logic [2:0]   t3;
  logic [4:0]   t5;
  logic [6:0]   t7;
  logic [104:0] rn;
  residue_tree #(.A(3), .BYTE_W(4)) u_t3 (.n(n), .r(t3));
  residue_tree #(.A(5), .BYTE_W(3)) u_t5 (.n(n), .r(t5));
  residue_tree #(.A(7), .BYTE_W(3)) u_t7 (.n(n), .r(t7));
  residue_translator3 u_net (.x(t3), .y(t5), .z(t7), .r(rn));

  task automatic chk(logic [104:0] got, logic [104:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL translator3 %s: x=%b y=%b z7=%b z9=%b n=%0d got %h expected %h",
                 what, x, y, z7, z9, n, got, exp);
    end
  endtask

  // Value below lcm with the given residues, or -1 if none.
  function automatic int crt(int p, int q, int s, int m);
    for (int v = 0; v < 3 * 5 * m; v++)
      if (v % 3 == p && v % 5 == q && v % m == s) return v;
    return -1;
  endfunction

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  bit hit105 [105];
  bit hit45  [45];
  int n105, n45;
  int cv;

  initial begin
    checks = 0; failures = 0; n = '0;
    for (int t = 0; t < 135; t++) begin
      int ip, iq, is;
      ip = t / 45; iq = (t / 9) % 5; is = t % 9;
      x = 3'(1 << ip); y = 5'(1 << iq); z9 = 9'(1 << is); z7 = 7'(1 << (is % 7));
      #1;
      cv = crt(ip, iq, is, 9);
      chk(105'(r45), (cv < 0) ? '0 : (105'(1) << (cv % 45)), "3x5x9 -> 45");
      if (cv >= 0) hit45[cv % 45] = 1'b1;
      if (is < 7) begin
        cv = crt(ip, iq, is, 7);
        chk(r105, 105'(1) << cv, "3x5x7 -> 105");
        hit105[cv] = 1'b1;
      end
    end
    checks += 2;
    n105 = 0; n45 = 0;
    foreach (hit105[i]) n105 += int'(hit105[i]);
    foreach (hit45[i]) n45 += int'(hit45[i]);
    if (n105 != 105) begin failures++; $display("FAIL translator3: 105 lines not all reached"); end
    if (n45 != 45) begin failures++; $display("FAIL translator3: 45 lines not all reached"); end
    // All-zero on each port.
    x = '0; y = 5'b00100; z7 = 7'b0000100; #1; chk(r105, '0, "X all-zero");
    x = 3'b010; y = '0; #1;                     chk(r105, '0, "Y all-zero");
    y = 5'b00100; z7 = '0; #1;                  chk(r105, '0, "Z all-zero");
    // Two-hot on each port (pairwise-prime product case).
    for (int unsigned k = 0; k < 3; k++) begin
      x = 3'b001; y = 5'b00001; z7 = 7'b0000001;
      if (k == 0) x = 3'b011;
      if (k == 1) y = 5'b00011;
      if (k == 2) z7 = 7'b0000011;
      #1;
      checks++;
      if ($countones(r105) != 2) begin
        failures++;
        $display("FAIL translator3: two-hot on port %0d gave %0d lines", k, $countones(r105));
      end
    end
    // Three-tree network on every 16-bit input.
    for (int v = 0; v < 65536; v++) begin
      n = 16'(v);
      #1;
      chk(rn, 105'(1) << (v % 105), "network mod 105");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
