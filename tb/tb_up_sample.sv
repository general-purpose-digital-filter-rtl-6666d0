// tb_up_sample -- checks the up-sampler in both of its forms.
//
// A slow stream (a new random value every 5 to 30 fast samples, announced by
// new_in) feeds a sample-repeating instance and a zero-inserting one. On each
// fast sample the repeating one must output the latest slow value; the
// zero-inserting one the new value on the first fast sample after it arrived
// and zero otherwise.
module tb_up_sample;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0, new_in = 1'b0;
  sig_t d = '0, q_hold, q_zero;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  up_sample #(.COPY_SAMPLES(1'b1)) u_hold (.clk, .rst_n, .ce, .new_in, .d, .q(q_hold));
  up_sample #(.COPY_SAMPLES(1'b0)) u_zero (.clk, .rst_n, .ce, .new_in, .d, .q(q_zero));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int latest, gap;
    bit fresh;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    latest = 0; fresh = 0; gap = 0;
    for (int n = 0; n < 3000; n++) begin
      if (gap == 0) begin
        // new slow sample, between fast samples
        latest = int'($urandom_range(0, 1048575)) - 524288;
        d = sig_t'(latest); new_in = 1'b1;
        @(posedge clk); #1;
        new_in = 1'b0;
        fresh = 1;
        gap = int'($urandom_range(5, 30));
      end
      gap--;
      ce = 1'b1;
      @(posedge clk); #1;
      ce = 1'b0;
      check(int'(q_hold) == latest, $sformatf("hold output %0d, expected %0d", q_hold, latest));
      check(int'(q_zero) == (fresh ? latest : 0), $sformatf("zero-insert output %0d", q_zero));
      fresh = 0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
