// tb_reduce_harness - drives one mod_reduce instance with every byte value
// and compares its output with (x * 2^SHIFT) mod A computed in integer
// arithmetic. Reports its check and failure counts through its ports and
// raises done when finished.
module tb_reduce_harness #(
  parameter int unsigned A     = 3,
  parameter int unsigned W     = 4,
  parameter int unsigned SHIFT = 0
) (
  output int checks,
  output int failures,
  output bit done
);
  logic [W-1:0] x;
  logic [A-1:0] r;

  mod_reduce #(.A(A), .W(W), .SHIFT(SHIFT)) dut (.x(x), .r(r));

  initial begin
    logic [63:0] seen;
    checks = 0; failures = 0; done = 0; seen = '0;
    for (int unsigned v = 0; v < 2 ** W; v++) begin
      longint unsigned expv;
      x = W'(v);
      #1;
      expv = (longint'(v) << SHIFT) % longint'(A);
      checks++;
      if (r != (A'(1) << expv)) begin
        failures++;
        $display("FAIL mod_reduce A=%0d W=%0d SHIFT=%0d x=%0d: r=%b expected residue %0d",
                 A, W, SHIFT, v, r, expv);
      end
      seen[6'(expv)] = 1'b1;
    end
    // Every output line must carry both values over the input set.
    checks++;
    if (seen[A-1:0] != {A{1'b1}}) begin
      failures++;
      $display("FAIL mod_reduce A=%0d W=%0d: not every residue occurred", A, W);
    end
    done = 1;
  end
endmodule
