// tb_cmult -- checks the x1.25 constant multiplier.
//
// Random 16-bit ADC codes, plus both ends of the range, are applied with ce
// high; after the clock the output must equal code * 1.25, i.e. code * 5 in
// units of 2**-FRAC_W. With ce low the output must hold. A 4.096 V input in
// the 0 .. 5.12 V range (code 52429) must come out at 65536.25.
module tb_cmult;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [SAMPLE_W-1:0] code = '0;
  sig_t q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cmult dut (.clk, .rst_n, .ce, .code, .q);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  task automatic apply(int c, bit en);
    sig_t prev_q;
    prev_q = q;
    code = 16'(c); ce = en;
    @(posedge clk); #1;
    ce = 1'b0;
    if (en) check(int'(q) == c * 5, $sformatf("code %0d -> %0d, expected %0d", c, q, c * 5));
    else    check(q == prev_q, "output held without ce");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(q == '0, "reset value");
    rst_n = 1'b1;
    apply(0, 1); apply(65535, 1); apply(32768, 1);
    apply(52429, 1);
    check(q == sig_t'(262145), "4.096 V maps to 65536.25");
    for (int i = 0; i < 500; i++) apply(int'($urandom_range(0, 65535)), $urandom_range(0, 3) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
