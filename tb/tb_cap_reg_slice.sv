// Self-checking test of the capability register column of one slice. Random loads of
// base and limit bits under random load lines, then every select pattern with at most
// one line high is read back from the precharged buses and compared with a model of
// the register bits; with nothing selected both buses must read one.
module tb_cap_reg_slice;
  localparam int N = 4;
  logic clk = 0;
  logic d;
  logic [N-1:0] ldb, ldl, sel;
  logic bb, lb;
  logic [N-1:0] mb, ml;
  int checks = 0, failures = 0;

  cap_reg_slice #(.NCAP(N)) dut (.clk(clk), .data_i(d), .ld_base_i(ldb), .ld_limit_i(ldl),
                                 .sel_i(sel), .base_bus_o(bb), .limit_bus_o(lb));

  always #5 clk = ~clk;

  initial begin
    // start from known contents: load every bit once
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      d = 1'(k);
      ldb = '1; ldl = '1; sel = '0;
      mb = {N{1'(k)}}; ml = {N{1'(k)}};
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      d   = 1'($urandom);
      ldb = N'($urandom);
      ldl = N'($urandom);
      for (int r = 0; r < N; r++) begin
        if (ldb[r]) mb[r] = d;
        if (ldl[r]) ml[r] = d;
      end
      @(negedge clk);
      ldb = '0; ldl = '0;
      for (int r = -1; r < N; r++) begin
        sel = (r < 0) ? '0 : N'(1 << r);
        #1;
        checks++;
        if (bb != ((r < 0) ? 1'b1 : mb[r]) || lb != ((r < 0) ? 1'b1 : ml[r])) begin
          failures++;
          $display("FAIL t=%0d reg %0d: base bus %b limit bus %b", t, r, bb, lb);
        end
      end
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
