// Capability register column of one bit slice: bit i of the base and of the limit of
// every capability register, and the base and limit buses they share.
//
// Each register bit has its own load line and captures the slice's data line on the
// clock edge while that line is high. The buses are precharged high; a register whose
// select line is high actively pulls the bus low when it holds a zero. The bus thus
// reads as the selected register's bit, and as one when no register is selected (a
// wired AND of ~sel | reg). The registers are dynamic in the chip and need refreshing;
// here they are static flip-flops with no reset, as the chip's registers have none.
// Reads are combinational; writes take effect at the clock edge.
module cap_reg_slice #(
  parameter int unsigned NCAP = 4  // capability registers (the chip's first version has 4)
) (
  input  logic            clk,
  input  logic            data_i,      // the slice's shared data line
  input  logic [NCAP-1:0] ld_base_i,   // load lines of the base bits
  input  logic [NCAP-1:0] ld_limit_i,  // load lines of the limit bits
  input  logic [NCAP-1:0] sel_i,       // read select, at most one high
  output logic            base_bus_o,  // precharged base bus
  output logic            limit_bus_o  // precharged limit bus
);
  logic [NCAP-1:0] base_q, limit_q;

  always_ff @(posedge clk) begin
    for (int r = 0; r < NCAP; r++) begin
      if (ld_base_i[r])  base_q[r]  <= data_i;
      if (ld_limit_i[r]) limit_q[r] <= data_i;
    end
  end

  // Precharged bus: stays high unless a selected register discharges it.
  assign base_bus_o  = &(~sel_i | base_q);
  assign limit_bus_o = &(~sel_i | limit_q);
endmodule
