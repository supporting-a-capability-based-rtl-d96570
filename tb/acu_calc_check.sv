// Test body for the address calculator, parameterised by offset width and number of
// capability registers so that one testbench can run several configurations.
//
// A host model loads random bases, limits and index registers through the shared data
// lines, reads them back, and issues calculations with random register numbers and
// offsets. For each calculation the result must appear exactly one cycle later with
// data_oe high, equal to (base + index + offset) mod 2**W, with error high exactly
// when that value exceeds the limit or the capability number names no register. Index
// number 3 must add nothing (kill-index). Limits are often set right at the computed
// address so that the boundary (equal: no error, one more: error) is exercised.
// checks/failures count up as it goes; done rises when the run is over.
module acu_calc_check #(
  parameter int W  = 28,
  parameter int NC = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import acu_pkg::*;
  localparam int NI = 3;
  logic rst_n = 0;
  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
  end
  acu_cmd_e cmd;
  logic [3:0] cap;
  logic [1:0] idx;
  logic [W-1:0] din, dout;
  logic oe, err;
  logic [W-1:0] mbase [NC], mlim [NC], midx [NI];
  int n_err = 0, n_ok = 0, n_kill = 0, n_inval = 0, n_wrap = 0, n_read = 0, n_edge = 0;

  address_calculator #(.WIDTH(W), .NCAP(NC), .NIDX(NI), .CAPNO_W(4), .IDXNO_W(2)) dut (
    .clk(clk), .rst_n(rst_n), .cmd_i(cmd), .cap_no_i(cap), .idx_no_i(idx),
    .data_i(din), .data_o(dout), .data_oe_o(oe), .error_o(err));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [W=%0d NCAP=%0d] %s at %0t", W, NC, what, $time);
    end
  endtask

  task automatic issue(input acu_cmd_e c, input logic [3:0] cn, input logic [1:0] xn,
                       input logic [W-1:0] v);
    cmd = c; cap = cn; idx = xn; din = v;
    @(negedge clk);
    cmd = CMD_NOP; din = 'x;
  endtask

  task automatic load_all();
    for (int r = 0; r < NC; r++) begin
      mbase[r] = W'($urandom);
      if ($urandom_range(0, 3) == 0) mbase[r] = '1 - W'($urandom_range(0, 1000));
      mlim[r] = W'($urandom);
      issue(CMD_LOAD_BASE, 4'(r), 0, mbase[r]);
      issue(CMD_LOAD_LIMIT, 4'(r), 0, mlim[r]);
    end
    for (int r = 0; r < NI; r++) begin
      midx[r] = ($urandom_range(0, 1) == 0) ? W'($urandom_range(0, 4095)) : W'($urandom);
      issue(CMD_LOAD_INDEX, 0, 2'(r), midx[r]);
    end
  endtask

  initial begin
    logic [W-1:0] off, exp_sum, ix;
    logic [3:0] cn;
    logic [1:0] xn;
    logic exp_err;
    longint full;
    cmd = CMD_NOP; cap = 0; idx = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_all();
    for (int t = 0; t < 2000; t++) begin
      if (t % 200 == 199) load_all();
      // read back a random register
      if ($urandom_range(0, 3) == 0) begin
        int k = int'($urandom_range(0, 2));
        cn = 4'($urandom_range(0, NC - 1));
        xn = 2'($urandom_range(0, NI - 1));
        issue(k == 0 ? CMD_READ_BASE : k == 1 ? CMD_READ_LIMIT : CMD_READ_INDEX, cn, xn, '0);
        n_read++;
        check(oe && !err, "read phase: data_oe high, no error");
        check(dout == (k == 0 ? mbase[cn] : k == 1 ? mlim[cn] : midx[xn]), "read back value");
        @(negedge clk);
      end
      cn = (NC < 16 && $urandom_range(0, 9) == 0) ? 4'($urandom_range(NC, 15)) : 4'($urandom_range(0, NC - 1));
      xn = 2'($urandom);
      off = ($urandom_range(0, 1) == 0) ? W'($urandom_range(0, 65535)) : W'($urandom);
      ix  = (xn < NI) ? midx[xn] : '0;
      if (cn < NC) begin
        full = longint'(mbase[cn]) + longint'(ix) + longint'(off);
        exp_sum = W'(full);
        if (full >= (longint'(1) << W)) n_wrap++;
        // sometimes place the limit on or next to the address
        if ($urandom_range(0, 4) == 0) begin
          mlim[cn] = exp_sum - W'($urandom_range(0, 1));
          issue(CMD_LOAD_LIMIT, cn, 0, mlim[cn]);
          n_edge++;
        end
        exp_err = (exp_sum > mlim[cn]);
      end else begin
        exp_sum = 'x;
        exp_err = 1'b1;
        n_inval++;
      end
      if (xn >= NI) n_kill++;
      cmd = CMD_CALC; cap = cn; idx = xn; din = off;
      #1;
      check(!oe, "calculator silent while the offset is presented");
      @(negedge clk);
      cmd = CMD_NOP;
      check(oe, "result driven one cycle after the offset");
      check(err == exp_err, "error signal");
      if (cn < NC) check(dout == exp_sum, "virtual address offset");
      if (exp_err) n_err++; else n_ok++;
      if ($urandom_range(0, 1) == 0) @(negedge clk);
      else begin
        // back-to-back reads are allowed right after an output phase
        issue(CMD_READ_INDEX, 0, 2'($urandom_range(0, NI - 1)), '0);
        check(oe, "read after output phase");
        @(negedge clk);
      end
      check(!oe, "lines released");
    end
    $display("W=%0d NCAP=%0d: limit errors %0d, in range %0d, kill-index %0d, invalid register %0d, wrap %0d, reads %0d, boundary %0d",
             W, NC, n_err, n_ok, n_kill, n_inval, n_wrap, n_read, n_edge);
    check(n_err > 0 && n_ok > 0 && n_kill > 0 && (n_inval > 0 || NC >= 16) && n_wrap > 0 && n_read > 0 && n_edge > 0,
          "every case exercised");
    done = 1'b1;
  end

endmodule
