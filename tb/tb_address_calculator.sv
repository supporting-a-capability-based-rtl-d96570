// Self-checking test of the address calculator in three configurations, run side by
// side: the 28-bit unit with 4 capability registers (the default), the same with the
// 16 capability registers of the MONADS-PC processor, and a 4-bit slice as a small
// test chip would be. Each runs about 2000 random calculations with register loads,
// read-back, kill-index, out-of-range register numbers and limit boundaries, checking
// every result and its one-cycle latency (see acu_calc_check).
module tb_address_calculator;
  logic clk = 0;
  int c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int checks, failures;

  always #5 clk = ~clk;

  acu_calc_check #(.W(28), .NC(4))  u_default (.clk(clk), .checks(c0), .failures(f0), .done(d0));
  acu_calc_check #(.W(28), .NC(16)) u_monads  (.clk(clk), .checks(c1), .failures(f1), .done(d1));
  acu_calc_check #(.W(4),  .NC(4))  u_slice4  (.clk(clk), .checks(c2), .failures(f2), .done(d2));

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2 + 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
