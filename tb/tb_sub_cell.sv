// Self-checking test of the limit subtractor cell. Exhaustive on one cell (carry of
// limit + ~offset + carry_in), then a 6-bit chain of cells checked against the
// comparison limit >= offset for every pair of 6-bit values.
module tb_sub_cell;
  localparam int W = 6;
  logic l, o, c, cy;
  logic [W-1:0] lim, off;
  logic [W:0]   ch;
  int checks = 0, failures = 0;

  sub_cell dut (.limit_i(l), .offset_i(o), .carry_i(c), .carry_o(cy));

  assign ch[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_chain
    sub_cell u (.limit_i(lim[i]), .offset_i(off[i]), .carry_i(ch[i]), .carry_o(ch[i+1]));
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {l, o, c} = 3'(v);
      #1;
      checks++;
      if (cy != ((int'(l) + int'(!o) + int'(c)) >= 2)) begin
        failures++;
        $display("FAIL cell %b%b%b -> %b", l, o, c, cy);
      end
    end
    for (int x = 0; x < (1 << W); x++)
      for (int y = 0; y < (1 << W); y++) begin
        lim = W'(x);
        off = W'(y);
        #1;
        checks++;
        if (ch[W] != (x >= y)) begin
          failures++;
          $display("FAIL chain limit %0d offset %0d -> %b", x, y, ch[W]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
