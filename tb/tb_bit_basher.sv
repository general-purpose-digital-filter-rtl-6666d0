// tb_bit_basher -- checks the integer-bit selection for the DAC.
//
// Random fixed-point values are applied with random ce; the output must be the
// 16 integer bits above the FRAC_W fraction bits, (value >> 2) mod 65536,
// after the clock, and must hold while ce is low.
module tb_bit_basher;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sig_t d = '0;
  logic [SAMPLE_W-1:0] code;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_basher dut (.clk, .rst_n, .ce, .d, .code);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  task automatic apply(int v, bit en);
    logic [15:0] prev_q;
    int e;
    prev_q = code;
    d = sig_t'(v); ce = en;
    @(posedge clk); #1;
    ce = 1'b0;
    e = (v >>> 2) & 32'hFFFF;
    if (en) check(int'(code) == e, $sformatf("%0d -> %0d, expected %0d", v, code, e));
    else    check(code == prev_q, "output held without ce");
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(code == '0, "reset value");
    rst_n = 1'b1;
    apply(131072, 1); apply(262143, 1); apply(3, 1); apply(-4, 1);
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
