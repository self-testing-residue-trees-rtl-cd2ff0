// tb_residue_translator - checks residue_translator for relatively prime
// moduli whose product is A ((3,5) -> 15, (3,7) -> 21, (5,7) -> 35) and for
// moduli sharing a factor, where A divides their least common multiple
// ((15,21) -> 105 and 35, (9,15) -> 15). The checks are in tb_xlat_harness.
module tb_residue_translator;
  localparam int N = 6;
  int  c [N];
  int  f [N];
  bit  d [N];

  tb_xlat_harness #(.P(3),  .Q(5))           h0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_xlat_harness #(.P(3),  .Q(7))           h1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_xlat_harness #(.P(5),  .Q(7))           h2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_xlat_harness #(.P(15), .Q(21), .A(105)) h3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  tb_xlat_harness #(.P(15), .Q(21), .A(35))  h4 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  tb_xlat_harness #(.P(9),  .Q(15), .A(15))  h5 (.checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    wait (d.and());
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
