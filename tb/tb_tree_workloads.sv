// tb_tree_workloads - the 32-bit residue tree configurations worked out as
// design examples, each checked against n mod A on corner values and 20000
// random numbers:
//   * modulo 5, nine 3-bit bytes and one 5-bit byte at the top
//   * modulo 5, eight 3-bit bytes and two 4-bit bytes at the top
//   * modulo 5, eight 4-bit bytes (every byte weight is 1 modulo 5)
//   * modulo 7, eight 4-bit bytes
//   * modulo 5, 3-bit bytes summed by a chain of +5 cells
//   * modulo 5, 3-bit bytes with alternating OR-AND/AND-OR layers
//   * modulo 3, eight 4-bit bytes, and modulo 15 with 4-bit bytes
//   * modulo 5, nine 3-bit bytes and one 5-bit byte in a complete tree
//     (bytes 0..3 added in pairs first), with and without level merging
//   * modulo 5, eight 3-bit and two 4-bit bytes in a complete tree
module tb_tree_workloads
  import residue_pkg::*;
;
  localparam int N = 11;
  int c [N];
  int f [N];
  bit d [N];

  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .NRAND(20000)) h0 (c[0], f[0], d[0]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .WIDE(2), .NRAND(20000)) h1 (c[1], f[1], d[1]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(4), .NRAND(20000)) h2 (c[2], f[2], d[2]);
  tb_tree_harness #(.WIDTH(32), .A(7), .BYTE_W(4), .NRAND(20000)) h3 (c[3], f[3], d[3]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .SHAPE(TREE_CHAIN), .NRAND(20000))
    h4 (c[4], f[4], d[4]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .LEVEL_MERGE(1'b1), .NRAND(20000))
    h5 (c[5], f[5], d[5]);
  tb_tree_harness #(.WIDTH(32), .A(3), .BYTE_W(4), .NRAND(20000)) h6 (c[6], f[6], d[6]);
  tb_tree_harness #(.WIDTH(32), .A(15), .BYTE_W(4), .NRAND(20000)) h7 (c[7], f[7], d[7]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .SHAPE(TREE_COMPLETE), .NRAND(20000))
    h8 (c[8], f[8], d[8]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .SHAPE(TREE_COMPLETE), .LEVEL_MERGE(1'b1),
                    .NRAND(20000)) h9 (c[9], f[9], d[9]);
  tb_tree_harness #(.WIDTH(32), .A(5), .BYTE_W(3), .WIDE(2), .SHAPE(TREE_COMPLETE),
                    .NRAND(20000)) h10 (c[10], f[10], d[10]);

  int checks, failures;

  initial begin : watchdog
    #10000000;
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
