// End-to-end test of the capability address unit at its default sizes (28-bit offsets,
// 4 capability registers, 3 index registers, 32-bit address space numbers).
//
// The host model sets up four capability registers (address space number, base and
// limit) and three index registers, then runs three kinds of reference:
//   - array of records: a segment holding N records of R bytes; the index register holds
//     record number * R (the unit does not scale the index) and the instruction offset
//     selects a field. Walking one record past the end must raise the error exactly at
//     the first byte beyond the limit.
//   - indexless references (index register number 3, kill-index), as used for scalar
//     variables and instruction fetch through a program capability.
//   - random references, including ones through non-existent capability registers.
// Each calculation is checked one cycle after the offset is presented: data_oe and
// vaddr_valid high, the offset equal to base + index + offset (mod 2**28), the address
// space number of the named register on asn_out, and error exactly when the offset lies
// beyond the limit or the register does not exist. Register read-back and back-to-back
// reads are also checked. Every mechanism must occur at least once.
module tb_capability_address_unit;
  import acu_pkg::*;
  localparam int W = 28, NC = 4, NI = 3;
  logic clk = 0, rst_n = 0;
  acu_cmd_e cmd;
  logic [3:0] cap;
  logic [1:0] idx;
  logic [W-1:0] din, dout;
  logic oe, err, asn_we, vv;
  logic [31:0] asn_in, asn_out;
  logic [W-1:0] mbase [NC], mlim [NC], midx [NI];
  logic [31:0]  masn [NC];
  int checks = 0, failures = 0;
  int n_err = 0, n_ok = 0, n_kill = 0, n_inval = 0, n_wrap = 0, n_read = 0, n_array_end = 0;

  capability_address_unit dut (
    .clk(clk), .rst_n(rst_n), .cmd(cmd), .cap_no(cap), .idx_no(idx),
    .data_in(din), .data_out(dout), .data_oe(oe), .error(err),
    .asn_we(asn_we), .asn_in(asn_in), .asn_out(asn_out), .vaddr_valid(vv));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic issue(input acu_cmd_e c, input logic [3:0] cn, input logic [1:0] xn,
                       input logic [W-1:0] v);
    cmd = c; cap = cn; idx = xn; din = v;
    @(negedge clk);
    cmd = CMD_NOP; din = '0;
  endtask

  task automatic set_cap(input int r, input logic [31:0] asn, input logic [W-1:0] b,
                         input logic [W-1:0] l);
    masn[r] = asn; mbase[r] = b; mlim[r] = l;
    cap = 4'(r); asn_in = asn; asn_we = 1;
    issue(CMD_LOAD_BASE, 4'(r), 0, b);
    asn_we = 0;
    issue(CMD_LOAD_LIMIT, 4'(r), 0, l);
  endtask

  task automatic set_idx(input int r, input logic [W-1:0] v);
    midx[r] = v;
    issue(CMD_LOAD_INDEX, 0, 2'(r), v);
  endtask

  // One address calculation, checked against the host's own arithmetic.
  task automatic calc(input logic [3:0] cn, input logic [1:0] xn, input logic [W-1:0] off,
                      output logic got_err);
    longint full;
    logic [W-1:0] exp_sum;
    logic exp_err;
    if (cn < NC) begin
      full = longint'(mbase[cn]) + longint'((xn < NI) ? midx[xn] : '0) + longint'(off);
      exp_sum = W'(full);
      exp_err = exp_sum > mlim[cn];
      if (full >= (longint'(1) << W)) n_wrap++;
    end else begin
      exp_sum = '0;
      exp_err = 1'b1;
      n_inval++;
    end
    if (xn >= NI) n_kill++;
    issue(CMD_CALC, cn, xn, off);
    check(oe && vv, "result phase one cycle after the offset");
    check(err == exp_err, "error");
    if (cn < NC) begin
      check(dout == exp_sum, "offset within address space");
      check(asn_out == masn[cn], "address space number");
    end
    if (exp_err) n_err++; else n_ok++;
    got_err = err;
    @(negedge clk);
    check(!oe && !vv, "lines released");
  endtask

  initial begin
    logic e;
    cmd = CMD_NOP; cap = 0; idx = 0; din = 0; asn_we = 0; asn_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // Capability 0: array of 100 records of 12 bytes at 0x0010000.
    set_cap(0, 32'h0000_1234, 28'h001_0000, 28'h001_0000 + 100 * 12 - 1);
    // Capability 1: program segment; capability 2: stack; capability 3: near the top.
    set_cap(1, 32'h0000_0042, 28'h000_4000, 28'h000_7fff);
    set_cap(2, 32'h8000_0001, 28'h020_0000, 28'h020_0fff);
    set_cap(3, 32'hdead_beef, 28'hfff_ff00, 28'hfff_ffff);
    set_idx(0, 0); set_idx(1, 28'd16); set_idx(2, 28'h000_0100);

    // Read everything back, reads issued back to back.
    for (int r = 0; r < NC; r++) begin
      issue(CMD_READ_BASE, 4'(r), 0, '0);
      check(oe && !err && dout == mbase[r], "read base");
      issue(CMD_READ_LIMIT, 4'(r), 0, '0);
      check(oe && !err && dout == mlim[r], "read limit");
      n_read += 2;
    end
    for (int r = 0; r < NI; r++) begin
      issue(CMD_READ_INDEX, 0, 2'(r), '0);
      check(oe && dout == midx[r], "read index");
      n_read++;
    end
    issue(CMD_READ_INDEX, 0, 2'd3, '0);
    check(oe && dout == '0, "killed index reads zero");
    @(negedge clk);

    // Array of records: field at offset 8 of each record, one record past the end.
    for (int rec = 0; rec <= 100; rec++) begin
      set_idx(0, W'(rec * 12));
      calc(0, 0, 28'd8, e);
      check(e == (rec == 100), "array bound");
      if (rec == 100 && e) n_array_end++;
    end
    // Last byte of the segment is allowed, the next one is not.
    set_idx(0, W'(99 * 12));
    calc(0, 0, 28'd11, e);
    check(!e, "last byte in range");
    calc(0, 0, 28'd12, e);
    check(e, "first byte beyond limit");

    // Instruction fetch through the program capability, no index.
    for (int pc = 0; pc < 64; pc++) calc(1, 2'd3, W'(pc * 4), e);
    calc(1, 2'd3, 28'h000_3fff, e);
    check(!e, "end of program segment");
    calc(1, 2'd3, 28'h000_4000, e);
    check(e, "beyond program segment");

    // Stack frame through index register 1, and a wrap past 2**28 on capability 3.
    for (int sp = 0; sp < 32; sp++) calc(2, 2'd1, W'(sp), e);
    calc(3, 2'd2, 28'h000_0100, e);

    // Random references.
    for (int t = 0; t < 3000; t++) begin
      if (t % 500 == 0)
        for (int r = 0; r < NI; r++) set_idx(r, ($urandom_range(0, 1) != 0) ? W'($urandom_range(0, 4095)) : W'($urandom));
      if (t % 700 == 0)
        for (int r = 0; r < NC; r++) set_cap(r, $urandom, W'($urandom), W'($urandom));
      calc(($urandom_range(0, 15) == 0) ? 4'($urandom_range(NC, 15)) : 4'($urandom_range(0, NC - 1)),
           2'($urandom), W'($urandom), e);
    end

    $display("in range %0d, limit errors %0d, kill-index %0d, invalid register %0d, wrap %0d, reads %0d, array end %0d",
             n_ok, n_err, n_kill, n_inval, n_wrap, n_read, n_array_end);
    check(n_ok > 0, "in-range reference occurred");
    check(n_err > 0, "limit error occurred");
    check(n_kill > 0, "kill-index occurred");
    check(n_inval > 0, "invalid register occurred");
    check(n_wrap > 0, "wrap-around occurred");
    check(n_read > 0, "register read-back occurred");
    check(n_array_end > 0, "array bound caught");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
