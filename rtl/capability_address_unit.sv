// Capability address unit: forms the full virtual address of a capability reference.
//
// A virtual address is an address space number and an offset within that address
// space. A capability register names a segment by base and limit within an address
// space; an instruction gives a capability register number, an optional index register
// and an offset. This unit combines the address calculator chip (offset = base + index
// + offset, checked against the limit) with the address space RAM (the address space
// number of each capability register), so that a calculation returns both halves.
//
// Interface: the host presents cmd/cap_no/idx_no and, for loads and calculations, a
// value on data_in. A calculation (CMD_CALC) in cycle N gives, in cycle N+1:
//   vaddr_valid = 1, data_oe = 1,
//   data_out    = within-address-space offset (WIDTH bits),
//   asn_out     = address space number of the capability register (ASN_W bits),
//   error       = the offset is beyond the limit or the register does not exist.
// The address space RAM is written through asn_we/asn_in, addressed by cap_no. The
// chip's shared data lines are modelled as data_in, data_out and the drive enable
// data_oe; the bidirectional pad itself lies outside.
module capability_address_unit
  import acu_pkg::*;
#(
  parameter int unsigned WIDTH   = acu_pkg::DEF_OFFSET_W,
  parameter int unsigned NCAP    = acu_pkg::DEF_NCAP,
  parameter int unsigned NIDX    = acu_pkg::DEF_NIDX,
  parameter int unsigned ASN_W   = acu_pkg::DEF_ASN_W,
  parameter int unsigned CAPNO_W = acu_pkg::DEF_CAPNO_W,
  parameter int unsigned IDXNO_W = acu_pkg::DEF_IDXNO_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  acu_cmd_e           cmd,
  input  logic [CAPNO_W-1:0] cap_no,
  input  logic [IDXNO_W-1:0] idx_no,
  input  logic [WIDTH-1:0]   data_in,
  output logic [WIDTH-1:0]   data_out,
  output logic               data_oe,
  output logic               error,
  input  logic               asn_we,
  input  logic [ASN_W-1:0]   asn_in,
  output logic [ASN_W-1:0]   asn_out,
  output logic               vaddr_valid
);
  address_calculator #(
    .WIDTH(WIDTH), .NCAP(NCAP), .NIDX(NIDX), .CAPNO_W(CAPNO_W), .IDXNO_W(IDXNO_W)
  ) u_calc (
    .clk      (clk),
    .rst_n    (rst_n),
    .cmd_i    (cmd),
    .cap_no_i (cap_no),
    .idx_no_i (idx_no),
    .data_i   (data_in),
    .data_o   (data_out),
    .data_oe_o(data_oe),
    .error_o  (error)
  );

  address_space_ram #(
    .DEPTH(NCAP), .ASN_W(ASN_W), .CAPNO_W(CAPNO_W)
  ) u_asn (
    .clk     (clk),
    .cap_no_i(cap_no),
    .we_i    (asn_we),
    .asn_i   (asn_in),
    .re_i    (cmd == CMD_CALC),
    .asn_o   (asn_out)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vaddr_valid <= 1'b0;
    else        vaddr_valid <= (cmd == CMD_CALC);
endmodule
