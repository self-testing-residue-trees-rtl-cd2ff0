// tb_tree_harness - drives one residue_tree configuration and checks it
// against n mod A computed in integer arithmetic.
//
// Inputs: every value when EXHAUSTIVE = 1, otherwise corner values (zero, all
// ones, each single bit, each single zero) followed by NRAND random numbers.
// Besides the output, every inter-cell signal of the tree (the node array)
// must be a 1-out-of-A code word for every input, and every one of them must
// show all A residues over the input set, the condition under which each
// line is exercised at both logic values.
module tb_tree_harness
  import residue_pkg::*;
#(
  parameter int unsigned WIDTH       = 16,
  parameter int unsigned A           = 3,
  parameter int unsigned BYTE_W      = 4,
  parameter int unsigned WIDE        = 0,
  parameter tree_shape_e SHAPE       = TREE_BALANCED,
  parameter bit          LEVEL_MERGE = 1'b0,
  parameter bit          EXHAUSTIVE  = 1'b0,
  parameter int unsigned NRAND       = 2000
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [WIDTH-1:0] n;
  logic [A-1:0]     r;

  residue_tree #(.WIDTH(WIDTH), .A(A), .BYTE_W(BYTE_W), .WIDE(WIDE), .SHAPE(SHAPE),
                 .LEVEL_MERGE(LEVEL_MERGE)) dut (.n(n), .r(r));

  // Copy of the tree's inter-cell signals, taken through constant-index
  // hierarchical references.
  localparam int unsigned NB    = byte_count(WIDTH, BYTE_W, WIDE);
  localparam int unsigned NNODE = tree_nodes(SHAPE, NB);
  logic [A-1:0] node [NNODE];
  logic [A-1:0] seen [NNODE];

  for (genvar k = 0; k < NNODE; k++) begin : g_tap
    assign node[k] = dut.node[k];
  end

  task automatic apply(longint unsigned v);
    longint unsigned expv;
    n = WIDTH'(v);
    #1;
    expv = longint'(n) % longint'(A);
    checks++;
    if (r !== (A'(1) << expv)) begin
      failures++;
      if (failures < 10)
        $display("FAIL tree W=%0d A=%0d BYTE_W=%0d n=%0h: r=%b expected residue %0d",
                 WIDTH, A, BYTE_W, n, r, expv);
    end
    for (int k = 0; k < NNODE; k++) begin
      checks++;
      if (!$onehot(node[k])) begin
        failures++;
        if (failures < 10) $display("FAIL tree node %0d not 1-out-of-%0d: %b", k, A, node[k]);
      end
      seen[k] |= node[k];
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    foreach (seen[k]) seen[k] = '0;
    if (EXHAUSTIVE) begin
      for (longint unsigned v = 0; v < (64'd1 << WIDTH); v++) apply(v);
    end else begin
      apply(0);
      apply(64'({WIDTH{1'b1}}));
      for (int b = 0; b < WIDTH; b++) begin
        apply(64'd1 << b);
        apply(~(64'd1 << b));
      end
      for (int t = 0; t < NRAND; t++) apply({$urandom, $urandom});
      // Small values: the low byte alone walks through its residues.
      for (int t = 0; t < 64; t++) apply(64'(t));
    end
    for (int k = 0; k < NNODE; k++) begin
      checks++;
      if (seen[k] != {A{1'b1}}) begin
        failures++;
        $display("FAIL tree node %0d showed only residues %b", k, seen[k]);
      end
    end
    $display("tree WIDTH=%0d A=%0d BYTE_W=%0d WIDE=%0d SHAPE=%s LEVEL_MERGE=%0d: %0d cells+leaves, checks=%0d failures=%0d",
             WIDTH, A, BYTE_W, WIDE, SHAPE.name(), LEVEL_MERGE, NNODE, checks, failures);
    done = 1;
  end
endmodule
