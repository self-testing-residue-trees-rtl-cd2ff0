// tb_mod_reduce - self-checking test of the |x|_A cell for the moduli, byte
// widths and byte positions of the worked examples: 4-bit modulo 3, 3-bit
// modulo 5 at weights 2^0, 2^3, 2^6, 2^9, the 5-bit and 4-bit modulo-5 end
// bytes of a 32-bit number, 4-bit modulo 7 and 4-bit modulo 15.
module tb_mod_reduce;
  localparam int N = 11;
  int  c [N];
  int  f [N];
  bit  d [N];

  tb_reduce_harness #(.A(3),  .W(4), .SHIFT(0))  h0  (c[0],  f[0],  d[0]);
  tb_reduce_harness #(.A(3),  .W(4), .SHIFT(12)) h1  (c[1],  f[1],  d[1]);
  tb_reduce_harness #(.A(5),  .W(3), .SHIFT(0))  h2  (c[2],  f[2],  d[2]);
  tb_reduce_harness #(.A(5),  .W(3), .SHIFT(3))  h3  (c[3],  f[3],  d[3]);
  tb_reduce_harness #(.A(5),  .W(3), .SHIFT(6))  h4  (c[4],  f[4],  d[4]);
  tb_reduce_harness #(.A(5),  .W(3), .SHIFT(9))  h5  (c[5],  f[5],  d[5]);
  tb_reduce_harness #(.A(5),  .W(5), .SHIFT(27)) h6  (c[6],  f[6],  d[6]);
  tb_reduce_harness #(.A(5),  .W(4), .SHIFT(28)) h7  (c[7],  f[7],  d[7]);
  tb_reduce_harness #(.A(7),  .W(4), .SHIFT(4))  h8  (c[8],  f[8],  d[8]);
  tb_reduce_harness #(.A(7),  .W(4), .SHIFT(8))  h9  (c[9],  f[9],  d[9]);
  tb_reduce_harness #(.A(15), .W(4), .SHIFT(12)) h10 (c[10], f[10], d[10]);

  int checks, failures;

  initial begin : watchdog
    #100000;
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
