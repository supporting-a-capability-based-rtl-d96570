// Control of the address calculator: decodes the command and the register numbers into
// the load lines, select lines and kill-index line that run down the bit slices, and
// decides when the chip drives the shared data lines.
//
// The offset, the register values and the result share one set of data lines. In the
// cycle a command is presented, load commands (and the offset of a calculation) are
// taken from the lines: the matching load line is high during that cycle and the value
// is captured at its closing clock edge. The register numbers are latched at the same
// edge, so in the following cycle the select lines hold steady while the chip drives
// the lines (data_oe high) with the result of a calculation or the register read back.
// A load or calculation may therefore not be presented in a cycle in which the chip
// drives the lines; an assertion checks this. Reads need no data lines and may follow
// one another every cycle; calculations can be issued every second cycle.
//
// Register numbers: a capability register number at or above NCAP selects nothing and
// marks the result invalid (the pins carry 4 bits while the chip holds 4 registers).
// An index register number at or above NIDX (code 3 with two pins and three
// registers) raises kill-index, so the index bus reads zero. These rules and the
// command set are this design's own choices.
module acu_control
  import acu_pkg::*;
#(
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
  output logic [NCAP-1:0]    ld_base_o,
  output logic [NCAP-1:0]    ld_limit_o,
  output logic [NIDX-1:0]    ld_index_o,
  output logic               ld_offset_o,
  output logic [NCAP-1:0]    sel_cap_o,
  output logic [NIDX-1:0]    sel_index_o,
  output logic               kill_index_o,
  output logic               cap_invalid_o,  // latched capability number names no register
  output logic               data_oe_o,      // chip drives the data lines this cycle
  output acu_out_e           out_sel_o       // what it drives
);
  logic [CAPNO_W-1:0] cap_q;
  logic [IDXNO_W-1:0] idx_q;

  // Load lines: decoded from the numbers presented with the command.
  always_comb begin
    ld_base_o   = '0;
    ld_limit_o  = '0;
    ld_index_o  = '0;
    ld_offset_o = (cmd_i == CMD_CALC);
    for (int r = 0; r < NCAP; r++) begin
      if (cap_no_i == CAPNO_W'(r)) begin
        ld_base_o[r]  = (cmd_i == CMD_LOAD_BASE);
        ld_limit_o[r] = (cmd_i == CMD_LOAD_LIMIT);
      end
    end
    for (int r = 0; r < NIDX; r++)
      if (idx_no_i == IDXNO_W'(r))
        ld_index_o[r] = (cmd_i == CMD_LOAD_INDEX);
  end

  // Register numbers and output phase, latched for the following cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_q     <= '0;
      idx_q     <= '0;
      data_oe_o <= 1'b0;
      out_sel_o <= OUT_RESULT;
    end else begin
      if (cmd_i != CMD_NOP) begin
        cap_q <= cap_no_i;
        idx_q <= idx_no_i;
      end
      data_oe_o <= (cmd_i == CMD_CALC) || (cmd_i == CMD_READ_BASE) ||
                   (cmd_i == CMD_READ_LIMIT) || (cmd_i == CMD_READ_INDEX);
      unique case (cmd_i)
        CMD_READ_BASE:  out_sel_o <= OUT_BASE;
        CMD_READ_LIMIT: out_sel_o <= OUT_LIMIT;
        CMD_READ_INDEX: out_sel_o <= OUT_INDEX;
        default:        out_sel_o <= OUT_RESULT;
      endcase
    end
  end

  // Select lines: decoded from the latched numbers.
  always_comb begin
    sel_cap_o   = '0;
    sel_index_o = '0;
    for (int r = 0; r < NCAP; r++)
      sel_cap_o[r] = (cap_q == CAPNO_W'(r));
    for (int r = 0; r < NIDX; r++)
      sel_index_o[r] = (idx_q == IDXNO_W'(r));
  end

  assign kill_index_o  = (32'(idx_q) >= NIDX);
  assign cap_invalid_o = (32'(cap_q) >= NCAP);

  // The host may not drive the shared lines while the chip does.
  a_no_contention: assert property (@(posedge clk) disable iff (!rst_n)
    data_oe_o |-> !(cmd_i inside {CMD_LOAD_BASE, CMD_LOAD_LIMIT, CMD_LOAD_INDEX, CMD_CALC}))
    else $error("load or calculation presented while the calculator drives the data lines");
endmodule
