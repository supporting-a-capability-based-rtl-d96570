// Self-checking test of the carry-propagate adder cell: all eight combinations of
// the two operand bits and the incoming carry, against 2*carry_o + sum_o = a + b + c.
module tb_cpa_cell;
  logic a, b, c, s, cy;
  int checks = 0, failures = 0;

  cpa_cell dut (.a_i(a), .b_i(b), .carry_i(c), .sum_o(s), .carry_o(cy));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (2 * int'(cy) + int'(s) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL %b%b%b -> sum %b carry %b", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
