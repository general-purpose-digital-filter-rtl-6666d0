// tb_addsub_const -- checks the bias subtractor and adder.
//
// Two instances: one subtracts and one adds 32768 (131072 in units of
// 2**-FRAC_W). Random inputs across the whole signal range are applied with
// random ce; the outputs must equal the input -/+ 131072, clipped to the
// signal format, after the clock, and hold while ce is low.
module tb_addsub_const;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sig_t d = '0, q_sub, q_add;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addsub_const #(.SUBTRACT(1'b1)) u_sub (.clk, .rst_n, .ce, .d, .q(q_sub));
  addsub_const #(.SUBTRACT(1'b0)) u_add (.clk, .rst_n, .ce, .d, .q(q_add));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  function automatic int clip(int v);
    if (v > 524287) return 524287;
    if (v < -524288) return -524288;
    return v;
  endfunction

  task automatic apply(int v, bit en);
    sig_t bs, ba;
    bs = q_sub; ba = q_add;
    d = sig_t'(v); ce = en;
    @(posedge clk); #1;
    ce = 1'b0;
    if (en) begin
      check(int'(q_sub) == clip(v - 131072), $sformatf("%0d - bias -> %0d", v, q_sub));
      check(int'(q_add) == clip(v + 131072), $sformatf("%0d + bias -> %0d", v, q_add));
    end else begin
      check(q_sub == bs && q_add == ba, "outputs held without ce");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    check(q_sub == '0 && q_add == '0, "reset value");
    rst_n = 1'b1;
    apply(0, 1); apply(262140, 1); apply(524287, 1); apply(-524288, 1); apply(-131072, 1);
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
