// tb_tree_stuck_faults - single stuck-at faults on the signals between the
// cells of a residue tree, the property the 1-out-of-A coding is meant to
// give. For the 16-bit modulo-3 tree (4-bit bytes) and a 12-bit modulo-5
// tree (four 3-bit bytes), and for a 15-bit modulo-5 complete tree with
// alternating OR-AND/AND-OR layers (five 3-bit bytes), every inter-cell line
// is in turn held at 0 and at 1 while every input number is applied. For
// every fault:
//   * fault-secure: the output is never a code word other than the right one;
//   * self-testing: at least one input makes the output a non-code word.
module tb_tree_stuck_faults;
  int checks, failures;

  tb_fault_harness #(.A(3), .BYTE_W(4)) h3 ();
  tb_fault_harness #(.A(5), .BYTE_W(3), .WIDTH(12)) h5 ();
  tb_fault_harness #(.A(5), .BYTE_W(3), .WIDTH(15), .SHAPE(residue_pkg::TREE_COMPLETE),
                     .LEVEL_MERGE(1'b1)) hm ();

  initial begin : watchdog
    #100000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (h3.done && h5.done && hm.done);
    checks = h3.checks + h5.checks + hm.checks;
    failures = h3.failures + h5.failures + hm.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
