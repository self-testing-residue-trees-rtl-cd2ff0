// tb_ones_adder - checks the 16-bit one's complement adder: the sum must
// equal a+b when that fits in 16 bits and a+b-65535 otherwise (end-around
// carry), the carry flag must match, and both cases must occur.
module tb_ones_adder;
  int checks, failures;
  int n_eac, n_noeac;

  logic [15:0] a, b, s;
  logic        eac;

  ones_adder dut (.a(a), .b(b), .s(s), .eac(eac));

  task automatic apply(logic [15:0] va, logic [15:0] vb);
    int unsigned t;
    logic [15:0] exps;
    a = va; b = vb;
    #1;
    t = int'(va) + int'(vb);
    exps = (t > 65535) ? 16'(t - 65535) : 16'(t);
    checks++;
    if (s !== exps || eac !== (t > 65535)) begin
      failures++;
      $display("FAIL ones_adder %h + %h: s=%h eac=%b expected %h %b", va, vb, s, eac, exps, t > 65535);
    end
    if (eac) n_eac++; else n_noeac++;
  endtask

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0; n_eac = 0; n_noeac = 0;
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    apply(16'hFFFE, 16'h0001);
    apply(16'hFFFF, 16'h0001);
    for (int i = 0; i < 20000; i++) apply(16'($urandom), 16'($urandom));
    checks++;
    if (n_eac == 0 || n_noeac == 0) begin failures++; $display("FAIL carry cases not both seen"); end
    $display("end-around carries: %0d, none: %0d", n_eac, n_noeac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
