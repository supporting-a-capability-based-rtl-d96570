// Self-checking test of the calculator's control block. Each command is presented
// with random register numbers; the load lines are checked in the same cycle, and the
// select lines, kill-index, invalid-register flag, output enable and output select in
// the following cycle, all against values decoded independently here.
module tb_acu_control;
  import acu_pkg::*;
  localparam int NC = 4, NI = 3;
  logic clk = 0, rst_n = 0;
  acu_cmd_e cmd;
  logic [3:0] cap;
  logic [1:0] idx;
  logic [NC-1:0] ldb, ldl, selc;
  logic [NI-1:0] ldi, seli;
  logic ldo, kill, inval, oe;
  acu_out_e osel;
  int checks = 0, failures = 0;

  acu_control #(.NCAP(NC), .NIDX(NI), .CAPNO_W(4), .IDXNO_W(2)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_i(cmd), .cap_no_i(cap), .idx_no_i(idx),
    .ld_base_o(ldb), .ld_limit_o(ldl), .ld_index_o(ldi), .ld_offset_o(ldo),
    .sel_cap_o(selc), .sel_index_o(seli), .kill_index_o(kill), .cap_invalid_o(inval),
    .data_oe_o(oe), .out_sel_o(osel));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cmd %s cap %0d idx %0d)", what, cmd.name(), cap, idx);
    end
  endtask

  initial begin
    cmd = CMD_NOP; cap = 0; idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!oe, "no output after reset");
    for (int t = 0; t < 400; t++) begin
      acu_cmd_e c;
      logic [3:0] cn;
      logic [1:0] xn;
      // never a load or calculation right after an output phase
      do c = acu_cmd_e'($urandom_range(0, 7));
      while (oe && c inside {CMD_LOAD_BASE, CMD_LOAD_LIMIT, CMD_LOAD_INDEX, CMD_CALC});
      cn = ($urandom_range(0, 4) == 0) ? 4'($urandom) : 4'($urandom_range(0, NC - 1));
      xn = 2'($urandom);
      cmd = c; cap = cn; idx = xn;
      #1;
      check(ldb == ((c == CMD_LOAD_BASE && cn < NC) ? NC'(1 << cn) : '0), "ld_base");
      check(ldl == ((c == CMD_LOAD_LIMIT && cn < NC) ? NC'(1 << cn) : '0), "ld_limit");
      check(ldi == ((c == CMD_LOAD_INDEX && xn < NI) ? NI'(1 << xn) : '0), "ld_index");
      check(ldo == (c == CMD_CALC), "ld_offset");
      @(negedge clk);
      cmd = CMD_NOP;
      #1;
      check(oe == (c inside {CMD_CALC, CMD_READ_BASE, CMD_READ_LIMIT, CMD_READ_INDEX}), "data_oe");
      if (c != CMD_NOP) begin
        check(selc == ((cn < NC) ? NC'(1 << cn) : '0), "sel_cap");
        check(seli == ((xn < NI) ? NI'(1 << xn) : '0), "sel_index");
        check(kill == (xn >= NI), "kill_index");
        check(inval == (cn >= NC), "cap_invalid");
      end
      case (c)
        CMD_READ_BASE:  check(osel == OUT_BASE, "out_sel base");
        CMD_READ_LIMIT: check(osel == OUT_LIMIT, "out_sel limit");
        CMD_READ_INDEX: check(osel == OUT_INDEX, "out_sel index");
        CMD_CALC:       check(osel == OUT_RESULT, "out_sel result");
        default: ;
      endcase
      if ($urandom_range(0, 1) == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
