// Limit subtractor cell: one bit of the subtraction limit - offset.
//
// The limit check only needs the sign of the difference, so the cell computes the
// chain carry of limit + ~offset + 1 (the first slice gets a carry-in of one). The
// carry out of the most significant slice is one when limit >= offset and zero when
// the computed offset lies beyond the limit; the calculator raises its error on the
// latter. The difference bits themselves are used by nothing and are not formed.
// Like the adder cell it uses generate / kill / propagate terms. Combinational.
module sub_cell (
  input  logic limit_i,   // bit of the selected capability register's limit (limit bus)
  input  logic offset_i,  // bit of the computed virtual address offset
  input  logic carry_i,   // carry (not-borrow) from the previous slice
  output logic carry_o    // carry (not-borrow) to the next slice
);
  logic b, gen, kill;

  assign b    = ~offset_i;
  assign gen  = limit_i & b;
  assign kill = ~limit_i & ~b;

  always_comb begin
    if (gen)       carry_o = 1'b1;
    else if (kill) carry_o = 1'b0;
    else           carry_o = carry_i;
  end
endmodule
