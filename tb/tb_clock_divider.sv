// tb_clock_divider -- checks the 100 MHz to 1 MHz divider.
//
// After reset the first tick must come HALF_PERIOD (50) cycles after reset is
// released, then exactly one tick every 100 cycles, each on the cycle in which
// clk_out has just risen; clk_out must be high for 50 and low for 50 cycles.
// Over 20000 cycles that is 200 ticks (1 MHz from 100 MHz).
module tb_clock_divider;

  logic clk = 1'b0, rst_n = 1'b0;
  logic clk_out, tick;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  clock_divider dut (.clk, .rst_n, .clk_out, .tick);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc, last_tick, nticks, high_run, low_run;
    logic prev_out;
    repeat (3) @(negedge clk);
    check(clk_out == 1'b0 && tick == 1'b0, "outputs low in reset");
    rst_n = 1'b1;
    cyc = 0; last_tick = -1; nticks = 0; high_run = 0; low_run = 0;
    prev_out = 1'b0;
    repeat (20000) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        nticks++;
        check(clk_out == 1'b1 && prev_out == 1'b0, "tick on the rising cycle of clk_out");
        if (last_tick < 0) check(cyc == 50, $sformatf("first tick at cycle %0d", cyc));
        else               check(cyc - last_tick == 100, $sformatf("tick spacing %0d", cyc - last_tick));
        last_tick = cyc;
      end
      if (clk_out != prev_out && cyc > 60) begin
        if (prev_out) check(high_run == 50, $sformatf("high for %0d cycles", high_run));
        else          check(low_run == 50, $sformatf("low for %0d cycles", low_run));
      end
      if (clk_out != prev_out) begin high_run = 0; low_run = 0; end
      if (clk_out) high_run++; else low_run++;
      prev_out = clk_out;
    end
    check(nticks == 200, $sformatf("%0d ticks in 20000 cycles", nticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
