// tb_fault_harness - stuck-at fault campaign on one residue tree (see
// tb_tree_stuck_faults). Each inter-cell line gets its own generate block
// that waits for its turn, forces the line, sweeps all inputs and releases.
module tb_fault_harness
  import residue_pkg::*;
#(
  parameter int unsigned A      = 3,
  parameter int unsigned BYTE_W = 4,
  parameter int unsigned WIDTH  = 16,
  parameter tree_shape_e SHAPE  = TREE_BALANCED,
  parameter bit          LEVEL_MERGE = 1'b0
);
  localparam int unsigned NB    = byte_count(WIDTH, BYTE_W, 0);
  localparam int unsigned NNODE = tree_nodes(SHAPE, NB);
  localparam int unsigned NFAULT = NNODE * A * 2;

  int checks, failures;
  bit done;
  int turn;
  int finished;

  logic [WIDTH-1:0] n;
  logic [A-1:0]     r;

  residue_tree #(.WIDTH(WIDTH), .A(A), .BYTE_W(BYTE_W), .SHAPE(SHAPE),
                 .LEVEL_MERGE(LEVEL_MERGE)) dut (.n(n), .r(r));

  // Sweep all inputs under the current fault; report what was seen.
  task automatic sweep(int k, int i, int sv);
    int n_noncode, n_wrong;
    n_noncode = 0; n_wrong = 0;
    for (int v = 0; v < (1 << WIDTH); v++) begin
      n = WIDTH'(v);
      #1;
      if (!$onehot(r)) n_noncode++;
      else if (r !== (A'(1) << (v % A))) n_wrong++;
    end
    checks += 2;
    if (n_wrong != 0) begin
      failures++;
      $display("FAIL mod %0d node %0d line %0d stuck-at-%0d: %0d wrong code words", A, k, i, sv, n_wrong);
    end
    if (n_noncode == 0) begin
      failures++;
      $display("FAIL mod %0d node %0d line %0d stuck-at-%0d: never detected", A, k, i, sv);
    end
  endtask

  for (genvar k = 0; k < NNODE; k++) begin : g_node
    for (genvar i = 0; i < A; i++) begin : g_line
      for (genvar sv = 0; sv < 2; sv++) begin : g_sv
        initial begin
          wait (turn == (k * A + i) * 2 + sv);
          force dut.node[k][i] = 1'(sv);
          sweep(k, i, sv);
          release dut.node[k][i];
          #1;
          turn++;
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0; turn = 0;
    wait (turn == NFAULT);
    $display("mod %0d tree: %0d inter-cell lines, %0d stuck-at faults, checks=%0d failures=%0d",
             A, NNODE * A, NFAULT, checks, failures);
    done = 1;
  end
endmodule
