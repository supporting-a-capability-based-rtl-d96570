// Three-way adder cell: one bit of the carry-save stage.
//
// The base bit, index bit and offset bit of one slice are added with no carry
// propagation: the third operand goes in where a full adder's carry input would.
// Two function blocks form the result, one the sum (odd parity of the three inputs)
// and one the carry (majority of the three inputs). The carry has the weight of the
// next bit and is passed to the carry-propagate adder cell of the next slice.
// Purely combinational.
module csa_cell (
  input  logic base_i,    // bit of the selected capability register's base (base bus)
  input  logic index_i,   // bit of the selected index register (index bus)
  input  logic offset_i,  // bit of the offset register
  output logic sum_o,     // sum, weight of this bit
  output logic carry_o    // carry, weight of the next bit
);
  // Sum function block
  assign sum_o   = base_i ^ index_i ^ offset_i;
  // Carry function block
  assign carry_o = (base_i & index_i) | (base_i & offset_i) | (index_i & offset_i);
endmodule
