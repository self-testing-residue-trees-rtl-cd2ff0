// tb_eq_checker - checks the 2-wire comparator for A = 15 and A = 3: equal
// code words give 01 or 10 (both must occur), different code words and
// all-zero inputs give 00.
module tb_eq_checker;
  int checks, failures;

  logic [14:0] x, y;
  logic [1:0]  z;
  logic [2:0]  x3, y3;
  logic [1:0]  z3;

  eq_checker dut (.x(x), .y(y), .z(z));
  eq_checker #(.A(3)) dut3 (.x(x3), .y(y3), .z(z3));

  task automatic chk(logic [1:0] got, logic [1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL eq %s: x=%b y=%b z=%b expected %b", what, x, y, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit saw01, saw10;
    checks = 0; failures = 0; saw01 = 0; saw10 = 0;
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 15; j++) begin
        x = 15'(1) << i; y = 15'(1) << j;
        x3 = 3'(1 << (i % 3)); y3 = 3'(1 << (j % 3));
        #1;
        if (i == j) begin
          chk(z, (i % 2 == 0) ? 2'b01 : 2'b10, "equal");
          if (z == 2'b01) saw01 = 1;
          if (z == 2'b10) saw10 = 1;
        end else chk(z, 2'b00, "different");
        if (i % 3 == j % 3) chk(z3, (i % 3 % 2 == 0) ? 2'b01 : 2'b10, "equal mod 3");
        else                chk(z3, 2'b00, "different mod 3");
      end
    for (int i = 0; i < 15; i++) begin
      x = 15'(1) << i; y = '0; #1; chk(z, 2'b00, "Y all-zero");
      y = 15'(1) << i; x = '0; #1; chk(z, 2'b00, "X all-zero");
    end
    checks++;
    if (!(saw01 && saw10)) begin failures++; $display("FAIL both pass codes not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
