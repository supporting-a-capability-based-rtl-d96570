// One bit slice of the address calculator.
//
// A slice holds one bit of everything: the base and limit bits of each capability
// register, the bits of the index registers, the bit of the offset register, one
// three-way (carry-save) adder cell, one carry-propagate adder cell and one limit
// subtractor cell. Slices are placed end to end; between neighbours run three chains:
// the three-way adder's carry (weight of the next bit), the adder's carry chain and the
// subtractor's carry chain. The least significant slice gets 0, 0 and 1 on them.
//
// Timing: the registers, including the offset register, are written at the clock edge
// from the slice's data line; everything from the registers to offset_o and the
// subtractor carry is combinational, so a whole address is ready one cycle after the
// offset is loaded.
module bit_slice #(
  parameter int unsigned NCAP = 4,
  parameter int unsigned NIDX = 3
) (
  input  logic            clk,
  input  logic            data_i,       // shared data line of this bit
  input  logic [NCAP-1:0] ld_base_i,
  input  logic [NCAP-1:0] ld_limit_i,
  input  logic [NCAP-1:0] sel_cap_i,
  input  logic [NIDX-1:0] ld_index_i,
  input  logic [NIDX-1:0] sel_index_i,
  input  logic            kill_index_i,
  input  logic            ld_offset_i,
  input  logic            csa_carry_i,  // three-way adder carry from the slice below
  output logic            csa_carry_o,  // three-way adder carry to the slice above
  input  logic            cpa_carry_i,  // carry chain in
  output logic            cpa_carry_o,  // carry chain out
  input  logic            sub_carry_i,  // subtractor chain in
  output logic            sub_carry_o,  // subtractor chain out
  output logic            offset_o,     // bit of the virtual address offset
  output logic            base_bus_o,   // bus values, for reading registers back
  output logic            limit_bus_o,
  output logic            index_bus_o
);
  logic offset_q;
  logic csa_sum;

  cap_reg_slice #(.NCAP(NCAP)) u_cap (
    .clk        (clk),
    .data_i     (data_i),
    .ld_base_i  (ld_base_i),
    .ld_limit_i (ld_limit_i),
    .sel_i      (sel_cap_i),
    .base_bus_o (base_bus_o),
    .limit_bus_o(limit_bus_o)
  );

  index_reg_slice #(.NIDX(NIDX)) u_idx (
    .clk        (clk),
    .data_i     (data_i),
    .ld_i       (ld_index_i),
    .sel_i      (sel_index_i),
    .kill_i     (kill_index_i),
    .index_bus_o(index_bus_o)
  );

  // Offset register bit
  always_ff @(posedge clk)
    if (ld_offset_i) offset_q <= data_i;

  csa_cell u_csa (
    .base_i  (base_bus_o),
    .index_i (index_bus_o),
    .offset_i(offset_q),
    .sum_o   (csa_sum),
    .carry_o (csa_carry_o)
  );

  cpa_cell u_cpa (
    .a_i    (csa_sum),
    .b_i    (csa_carry_i),
    .carry_i(cpa_carry_i),
    .sum_o  (offset_o),
    .carry_o(cpa_carry_o)
  );

  sub_cell u_sub (
    .limit_i (limit_bus_o),
    .offset_i(offset_o),
    .carry_i (sub_carry_i),
    .carry_o (sub_carry_o)
  );
endmodule
