// Self-checking test of the index register column of one slice: random loads, then
// each register read through the precharged bus, and kill-index checked to force the
// bus to zero whatever is selected.
module tb_index_reg_slice;
  localparam int N = 3;
  logic clk = 0;
  logic d, kill, bus;
  logic [N-1:0] ld, sel, m;
  int checks = 0, failures = 0, kills = 0;

  index_reg_slice #(.NIDX(N)) dut (.clk(clk), .data_i(d), .ld_i(ld), .sel_i(sel),
                                   .kill_i(kill), .index_bus_o(bus));

  always #5 clk = ~clk;

  initial begin
    kill = 0; sel = '0;
    @(negedge clk); d = 1; ld = '1; m = '1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      d  = 1'($urandom);
      ld = N'($urandom);
      for (int r = 0; r < N; r++) if (ld[r]) m[r] = d;
      @(negedge clk);
      ld = '0;
      for (int r = 0; r < N; r++) begin
        sel  = N'(1 << r);
        kill = 1'($urandom);
        #1;
        checks++;
        if (kill) kills++;
        if (bus != (kill ? 1'b0 : m[r])) begin
          failures++;
          $display("FAIL t=%0d reg %0d kill %b: bus %b model %b", t, r, kill, bus, m[r]);
        end
      end
    end
    checks++;
    if (kills == 0) failures++;
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
