// Self-checking test of the address space RAM: random writes and reads of 32-bit
// address space numbers, with the value checked one cycle after the read request and
// held while no read is requested; entries beyond the depth read zero.
module tb_address_space_ram;
  localparam int D = 4;
  logic clk = 0;
  logic [3:0] a;
  logic we, re;
  logic [31:0] wd, rd;
  logic [31:0] m [D];
  int checks = 0, failures = 0;

  address_space_ram #(.DEPTH(D), .ASN_W(32), .CAPNO_W(4)) dut (
    .clk(clk), .cap_no_i(a), .we_i(we), .asn_i(wd), .re_i(re), .asn_o(rd));

  always #5 clk = ~clk;

  initial begin
    logic [31:0] exp;
    we = 0; re = 0; a = 0; wd = 0;
    for (int r = 0; r < D; r++) begin
      @(negedge clk); we = 1; a = 4'(r); wd = $urandom; m[r] = wd;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      a  = ($urandom_range(0, 7) == 0) ? 4'($urandom_range(D, 15)) : 4'($urandom_range(0, D - 1));
      if ($urandom_range(0, 1) == 0) begin
        we = 1; wd = $urandom;
        if (a < D) m[a] = wd;
        @(negedge clk); we = 0;
      end
      re = 1;
      exp = (a < D) ? m[a] : '0;
      @(negedge clk);
      re = 0;
      checks++;
      if (rd != exp) begin
        failures++;
        $display("FAIL read %0d: %h expected %h", a, rd, exp);
      end
      a = 4'($urandom_range(0, D - 1));
      @(negedge clk);
      checks++;
      if (rd != exp) begin
        failures++;
        $display("FAIL output not held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
