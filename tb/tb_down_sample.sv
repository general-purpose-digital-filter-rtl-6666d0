// tb_down_sample -- checks the 1 MSPS to 44.1 kSPS down-sampler.
//
// 20000 input samples (one every 4 clocks) carry their own index as data. The
// sample with index n (counted from 1) must be kept exactly when
// floor(441*n/10000) increases, so 882 samples are kept in all, 22 or 23 input
// samples apart; ce_out must pulse for one cycle right after the kept
// sample's ce, with that sample on q.
module tb_down_sample;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sig_t d = '0, q;
  logic ce_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  down_sample dut (.clk, .rst_n, .ce, .d, .q, .ce_out);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int kept, last;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    kept = 0; last = 0;
    for (int n = 1; n <= 20000; n++) begin
      bit want;
      want = ((n * 441) / 10000) != (((n - 1) * 441) / 10000);
      d = sig_t'(n); ce = 1'b1;
      @(posedge clk); #1;
      ce = 1'b0;
      check(ce_out == want, $sformatf("sample %0d kept=%0d expected %0d", n, ce_out, want));
      if (ce_out) begin
        check(int'(q) == n, $sformatf("kept value %0d for sample %0d", q, n));
        if (last > 0) check(n - last == 22 || n - last == 23, $sformatf("spacing %0d", n - last));
        last = n;
        kept++;
      end
      @(posedge clk); #1;
      check(ce_out == 1'b0, "ce_out lasts one cycle");
      repeat (2) @(posedge clk);
      #1;
    end
    check(kept == 882, $sformatf("%0d samples kept of 20000", kept));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
