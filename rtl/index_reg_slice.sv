// Index register column of one bit slice: bit i of each index register and the
// precharged index bus.
//
// Works like the capability register column: each bit loads from the slice's data
// line under its own load line, and a selected register holding zero discharges the
// precharged bus. The kill-index line discharges the bus whatever is selected, so the
// three-way adder then adds zero; this is how an addressing mode without an index
// register is served. Static flip-flops without reset stand in for the dynamic
// registers of the chip. Read is combinational, write at the clock edge.
module index_reg_slice #(
  parameter int unsigned NIDX = 3  // index registers
) (
  input  logic            clk,
  input  logic            data_i,      // the slice's shared data line
  input  logic [NIDX-1:0] ld_i,        // load lines
  input  logic [NIDX-1:0] sel_i,       // read select, at most one high
  input  logic            kill_i,      // kill-index: force the bus to zero
  output logic            index_bus_o  // precharged index bus
);
  logic [NIDX-1:0] index_q;

  always_ff @(posedge clk) begin
    for (int r = 0; r < NIDX; r++)
      if (ld_i[r]) index_q[r] <= data_i;
  end

  assign index_bus_o = ~kill_i & (&(~sel_i | index_q));
endmodule
