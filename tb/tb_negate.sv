// tb_negate -- checks the sign inversion stage.
//
// Random signed inputs are applied with random ce; the output must be the
// negated input after the clock (the most negative value clipping to the
// largest positive one) and must hold while ce is low.
module tb_negate;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sig_t d = '0, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  negate dut (.clk, .rst_n, .ce, .d, .q);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  task automatic apply(int v, bit en);
    sig_t prev_q;
    int   e;
    prev_q = q;
    d = sig_t'(v); ce = en;
    @(posedge clk); #1;
    ce = 1'b0;
    e = (v == -524288) ? 524287 : -v;
    if (en) check(int'(q) == e, $sformatf("-(%0d) -> %0d", v, q));
    else    check(q == prev_q, "output held without ce");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(q == '0, "reset value");
    rst_n = 1'b1;
    apply(0, 1); apply(1, 1); apply(-131072, 1); apply(524287, 1); apply(-524288, 1);
    for (int i = 0; i < 500; i++)
      apply(int'($urandom_range(0, 1048575)) - 524288, $urandom_range(0, 3) != 0);
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
