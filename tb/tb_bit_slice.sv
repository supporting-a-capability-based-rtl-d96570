// Self-checking test of one bit slice. Registers are loaded through the data line
// under random load lines; then, with random selects, kill-index and incoming chain
// values, the slice's offset bit, three outgoing chain bits and bus values are checked
// against a bit-level model: s = b^x^o, c = maj(b,x,o), offset = s^cin_csa^cin_cpa,
// and the adder and subtractor carries as full-adder carries.
module tb_bit_slice;
  localparam int NC = 4, NI = 3;
  logic clk = 0;
  logic d, kill, ldo, csa_i, cpa_i, sub_i;
  logic [NC-1:0] ldb, ldl, selc;
  logic [NI-1:0] ldi, seli;
  logic csa_o, cpa_o, sub_o, off, bb, lb, ib;
  logic [NC-1:0] mb, ml;
  logic [NI-1:0] mi;
  logic mo;
  int checks = 0, failures = 0;

  bit_slice #(.NCAP(NC), .NIDX(NI)) dut (
    .clk(clk), .data_i(d), .ld_base_i(ldb), .ld_limit_i(ldl), .sel_cap_i(selc),
    .ld_index_i(ldi), .sel_index_i(seli), .kill_index_i(kill), .ld_offset_i(ldo),
    .csa_carry_i(csa_i), .csa_carry_o(csa_o), .cpa_carry_i(cpa_i), .cpa_carry_o(cpa_o),
    .sub_carry_i(sub_i), .sub_carry_o(sub_o), .offset_o(off),
    .base_bus_o(bb), .limit_bus_o(lb), .index_bus_o(ib));

  always #5 clk = ~clk;

  function automatic logic maj(logic a, logic b, logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  logic eb, el, ei, es, ec, eoff;

  initial begin
    selc = '0; seli = '0; kill = 0; csa_i = 0; cpa_i = 0; sub_i = 1;
    @(negedge clk); d = 0; ldb = '1; ldl = '1; ldi = '1; ldo = 1;
    mb = '0; ml = '0; mi = '0; mo = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d = 1'($urandom);
      ldb = NC'($urandom); ldl = NC'($urandom); ldi = NI'($urandom); ldo = 1'($urandom);
      for (int r = 0; r < NC; r++) begin
        if (ldb[r]) mb[r] = d;
        if (ldl[r]) ml[r] = d;
      end
      for (int r = 0; r < NI; r++) if (ldi[r]) mi[r] = d;
      if (ldo) mo = d;
      @(negedge clk);
      ldb = '0; ldl = '0; ldi = '0; ldo = 0;
      begin
        int rc, ri;
        rc = int'($urandom_range(0, NC - 1));
        ri = int'($urandom_range(0, NI - 1));
        selc = NC'(1 << rc);
        seli = NI'(1 << ri);
        kill = ($urandom_range(0, 3) == 0);
        csa_i = 1'($urandom); cpa_i = 1'($urandom); sub_i = 1'($urandom);
        #1;
        eb = mb[rc]; el = ml[rc]; ei = kill ? 1'b0 : mi[ri];
        es = eb ^ ei ^ mo;
        ec = maj(eb, ei, mo);
        eoff = es ^ csa_i ^ cpa_i;
        checks++;
        if (bb != eb || lb != el || ib != ei || off != eoff || csa_o != ec ||
            cpa_o != maj(es, csa_i, cpa_i) || sub_o != maj(el, !eoff, sub_i)) begin
          failures++;
          $display("FAIL t=%0d bus %b%b%b off %b chains %b%b%b", t, bb, lb, ib, off,
                   csa_o, cpa_o, sub_o);
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
