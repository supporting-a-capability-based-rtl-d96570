// Address calculator chip: computes the within-address-space offset of a capability
// reference, base + index + offset, and checks it against the capability's limit.
//
// The chip is WIDTH identical bit slices (bit_slice) placed end to end plus a small
// control block (acu_control). Every slice holds one bit of each capability register's
// base and limit, of each index register and of the offset register. The three
// operands are first reduced to a sum and a carry vector by a row of three-way adder
// cells with no carry propagation; one carry-propagate adder then forms the offset,
// and a subtractor chain forms limit - offset, whose final borrow is the error.
//
// Interface: one set of WIDTH data lines is shared by input and output (data_i is what
// the pads receive, data_o/data_oe_o what the chip drives). Alongside them come a
// command, the capability register number and the index register number.
//   cycle N   : cmd = CMD_CALC, offset on data_i, cap_no, idx_no
//   cycle N+1 : data_oe_o = 1, data_o = base + index + offset (mod 2**WIDTH),
//               error_o = 1 if that offset exceeds the limit or cap_no names no register
// Loads (CMD_LOAD_*) take data_i in their own cycle; reads (CMD_READ_*) drive the
// register's value in the next cycle. The sum wraps modulo 2**WIDTH, as a chain of
// slices does when the top carries are dropped; only the limit is checked. The command
// set, the one-cycle output phase and the invalid-register error are this design's
// choices; the slice structure, the bus and kill-index behaviour, and the adder
// organisation follow the original chip.
module address_calculator
  import acu_pkg::*;
#(
  parameter int unsigned WIDTH   = acu_pkg::DEF_OFFSET_W,
  parameter int unsigned NCAP    = acu_pkg::DEF_NCAP,
  parameter int unsigned NIDX    = acu_pkg::DEF_NIDX,
  parameter int unsigned CAPNO_W = acu_pkg::DEF_CAPNO_W,
  parameter int unsigned IDXNO_W = acu_pkg::DEF_IDXNO_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  acu_cmd_e           cmd_i,
  input  logic [CAPNO_W-1:0] cap_no_i,
  input  logic [IDXNO_W-1:0] idx_no_i,
  input  logic [WIDTH-1:0]   data_i,
  output logic [WIDTH-1:0]   data_o,
  output logic               data_oe_o,
  output logic               error_o
);
  logic [NCAP-1:0] ld_base, ld_limit, sel_cap;
  logic [NIDX-1:0] ld_index, sel_index;
  logic            ld_offset, kill_index, cap_invalid;
  acu_out_e        out_sel;

  acu_control #(
    .NCAP(NCAP), .NIDX(NIDX), .CAPNO_W(CAPNO_W), .IDXNO_W(IDXNO_W)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .cmd_i        (cmd_i),
    .cap_no_i     (cap_no_i),
    .idx_no_i     (idx_no_i),
    .ld_base_o    (ld_base),
    .ld_limit_o   (ld_limit),
    .ld_index_o   (ld_index),
    .ld_offset_o  (ld_offset),
    .sel_cap_o    (sel_cap),
    .sel_index_o  (sel_index),
    .kill_index_o (kill_index),
    .cap_invalid_o(cap_invalid),
    .data_oe_o    (data_oe_o),
    .out_sel_o    (out_sel)
  );

  // Chains between slices; index 0 is the input of the least significant slice.
  logic [WIDTH:0]   csa_c, cpa_c, sub_c;
  logic [WIDTH-1:0] offset, base_bus, limit_bus, index_bus;

  assign csa_c[0] = 1'b0;
  assign cpa_c[0] = 1'b0;
  assign sub_c[0] = 1'b1;  // limit + ~offset + 1

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    bit_slice #(.NCAP(NCAP), .NIDX(NIDX)) u_slice (
      .clk         (clk),
      .data_i      (data_i[i]),
      .ld_base_i   (ld_base),
      .ld_limit_i  (ld_limit),
      .sel_cap_i   (sel_cap),
      .ld_index_i  (ld_index),
      .sel_index_i (sel_index),
      .kill_index_i(kill_index),
      .ld_offset_i (ld_offset),
      .csa_carry_i (csa_c[i]),
      .csa_carry_o (csa_c[i+1]),
      .cpa_carry_i (cpa_c[i]),
      .cpa_carry_o (cpa_c[i+1]),
      .sub_carry_i (sub_c[i]),
      .sub_carry_o (sub_c[i+1]),
      .offset_o    (offset[i]),
      .base_bus_o  (base_bus[i]),
      .limit_bus_o (limit_bus[i]),
      .index_bus_o (index_bus[i])
    );
  end

  // What goes out on the shared lines in the output phase.
  always_comb begin
    unique case (out_sel)
      OUT_BASE:  data_o = base_bus;
      OUT_LIMIT: data_o = limit_bus;
      OUT_INDEX: data_o = index_bus;
      default:   data_o = offset;
    endcase
  end

  // Carry out of the top subtractor slice is zero when limit < offset.
  assign error_o = data_oe_o && (out_sel == OUT_RESULT) && (!sub_c[WIDTH] || cap_invalid);
endmodule
