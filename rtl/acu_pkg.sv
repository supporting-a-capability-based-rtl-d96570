// Shared types and constants of the capability address calculator.
//
// The calculator turns a capability register (base, limit), an index register and the
// offset field of an instruction into a within-address-space offset plus a limit error.
// This package holds the default sizes (28-bit offsets, 4 capability registers, 3 index
// registers, 32-bit address space numbers, a 4-bit capability register number and a
// 2-bit index register number, all as in the MONADS-PC design) and the command encoding
// of the chip's control inputs. The command set and its encoding are this design's own:
// the original chip's control signals are not specified beyond its register numbers.
package acu_pkg;

  localparam int unsigned DEF_OFFSET_W = 28;  // within-address-space offset
  localparam int unsigned DEF_ASN_W    = 32;  // address space number
  localparam int unsigned DEF_NCAP     = 4;   // capability registers on the chip
  localparam int unsigned DEF_NIDX     = 3;   // index registers on the chip
  localparam int unsigned DEF_CAPNO_W  = 4;   // capability register number pins
  localparam int unsigned DEF_IDXNO_W  = 2;   // index register number pins

  // Command presented with the register numbers (and, for loads, a value on the
  // shared data lines) in one clock cycle.
  typedef enum logic [2:0] {
    CMD_NOP        = 3'd0,  // nothing; the chip does not drive the data lines next cycle
    CMD_LOAD_BASE  = 3'd1,  // base of capability register cap_no  <= data lines
    CMD_LOAD_LIMIT = 3'd2,  // limit of capability register cap_no <= data lines
    CMD_LOAD_INDEX = 3'd3,  // index register idx_no                <= data lines
    CMD_CALC       = 3'd4,  // offset register <= data lines; result driven next cycle
    CMD_READ_BASE  = 3'd5,  // base of cap_no driven next cycle
    CMD_READ_LIMIT = 3'd6,  // limit of cap_no driven next cycle
    CMD_READ_INDEX = 3'd7   // index register idx_no driven next cycle
  } acu_cmd_e;

  // What the chip drives onto the shared data lines in the cycle after a command.
  typedef enum logic [1:0] {
    OUT_RESULT = 2'd0,
    OUT_BASE   = 2'd1,
    OUT_LIMIT  = 2'd2,
    OUT_INDEX  = 2'd3
  } acu_out_e;

endpackage
