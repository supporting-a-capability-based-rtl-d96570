// Carry-propagate adder cell: one bit of the adder that merges the three-way adder's
// sum and carry vectors into the final offset.
//
// The cell follows a Manchester carry chain: from its two operand bits it forms
// generate (both one), kill (both zero) and propagate (exactly one). A generated carry
// sets the outgoing chain, a killed carry clears it, and otherwise the incoming carry
// passes through. In the chip the chain is precharged and discharged by these terms;
// here it is written as the equivalent static logic. Purely combinational: the carry
// ripples through all slices in one cycle.
module cpa_cell (
  input  logic a_i,      // sum from this slice's three-way adder
  input  logic b_i,      // carry from the previous slice's three-way adder
  input  logic carry_i,  // carry chain from the previous slice
  output logic sum_o,    // bit of the virtual address offset
  output logic carry_o   // carry chain to the next slice
);
  logic gen, kill, prop;

  assign gen  = a_i & b_i;
  assign kill = ~a_i & ~b_i;
  assign prop = a_i ^ b_i;

  always_comb begin
    if (gen)       carry_o = 1'b1;
    else if (kill) carry_o = 1'b0;
    else           carry_o = carry_i;
  end

  assign sum_o = prop ^ carry_i;
endmodule
