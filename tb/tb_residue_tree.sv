// tb_residue_tree - self-checking test of the residue tree: the default
// 16-bit modulo-3 tree on all 65536 inputs, the same tree with alternating
// OR-AND/AND-OR layers (level merging) and as a chain of +A cells, and a
// 16-bit modulo-5 tree whose five bytes have uneven weights and an odd byte
// count (a pass-through node in the balanced tree). The complete tree shape
// is checked on a 16-bit modulo-5 tree (one extra cell, level merged), a
// 14-bit modulo-3 tree of seven 2-bit bytes (three extra cells) and a 16-bit
// modulo-7 tree, all on every input.
module tb_residue_tree
  import residue_pkg::*;
;
  localparam int N = 8;
  int c [N];
  int f [N];
  bit d [N];

  tb_tree_harness #(.EXHAUSTIVE(1'b1)) h0 (c[0], f[0], d[0]);
  tb_tree_harness #(.LEVEL_MERGE(1'b1), .EXHAUSTIVE(1'b1)) h1 (c[1], f[1], d[1]);
  tb_tree_harness #(.SHAPE(TREE_CHAIN), .EXHAUSTIVE(1'b1)) h2 (c[2], f[2], d[2]);
  tb_tree_harness #(.A(5), .BYTE_W(3), .EXHAUSTIVE(1'b1)) h3 (c[3], f[3], d[3]);
  tb_tree_harness #(.A(5), .BYTE_W(3), .SHAPE(TREE_CHAIN), .LEVEL_MERGE(1'b1),
                    .EXHAUSTIVE(1'b1)) h4 (c[4], f[4], d[4]);
  tb_tree_harness #(.A(5), .BYTE_W(3), .SHAPE(TREE_COMPLETE), .LEVEL_MERGE(1'b1),
                    .EXHAUSTIVE(1'b1)) h5 (c[5], f[5], d[5]);
  tb_tree_harness #(.WIDTH(14), .A(3), .BYTE_W(2), .SHAPE(TREE_COMPLETE),
                    .EXHAUSTIVE(1'b1)) h6 (c[6], f[6], d[6]);
  tb_tree_harness #(.A(7), .BYTE_W(3), .SHAPE(TREE_COMPLETE),
                    .EXHAUSTIVE(1'b1)) h7 (c[7], f[7], d[7]);

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
