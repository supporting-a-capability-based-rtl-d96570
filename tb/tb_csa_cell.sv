// Self-checking test of the three-way adder cell: all eight input combinations,
// checking that 2*carry + sum equals the arithmetic sum of the three input bits.
module tb_csa_cell;
  logic a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_cell dut (.base_i(a), .index_i(b), .offset_i(c), .sum_o(s), .carry_o(cy));

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
