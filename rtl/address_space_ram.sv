// Address space RAM: the address space number of each capability register.
//
// The address space half of a virtual address needs no arithmetic, so it is held in a
// small RAM indexed by the capability register number, next to the offset calculator.
// One write port and one read port share the register number. The read is
// synchronous: the number presented with a read request appears on asn_o in the next
// cycle, the same cycle in which the calculator drives the offset, so both halves of
// the virtual address leave together. asn_o holds its value until the next read.
// Depth follows the calculator's register count; width is the 32-bit address space
// number. Contents are not reset.
module address_space_ram #(
  parameter int unsigned DEPTH   = acu_pkg::DEF_NCAP,
  parameter int unsigned ASN_W   = acu_pkg::DEF_ASN_W,
  parameter int unsigned CAPNO_W = acu_pkg::DEF_CAPNO_W
) (
  input  logic               clk,
  input  logic [CAPNO_W-1:0] cap_no_i,
  input  logic               we_i,    // write asn_i to entry cap_no_i
  input  logic [ASN_W-1:0]   asn_i,
  input  logic               re_i,    // read entry cap_no_i, result next cycle
  output logic [ASN_W-1:0]   asn_o
);
  logic [ASN_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && 32'(cap_no_i) < DEPTH)
      mem[cap_no_i[$clog2(DEPTH)-1:0]] <= asn_i;
    if (re_i)
      asn_o <= (32'(cap_no_i) < DEPTH) ? mem[cap_no_i[$clog2(DEPTH)-1:0]] : '0;
  end
endmodule
