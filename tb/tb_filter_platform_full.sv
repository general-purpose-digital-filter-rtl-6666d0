// tb_filter_platform_full -- the platform at its default size, end to end.
//
// Runs filter_platform_top with all its defaults: a 171-tap symmetric FIR
// filter on 86 multipliers, in the 44.1 kSPS audio configuration. The
// coefficients are random and small enough that the output cannot clip; the
// input voltage is a new random value in 1.0 .. 3.0 V every 1 MHz sample.
// After the filter has filled (171 filter samples, about 3900 ADC samples)
// every DAC frame is compared with the harness's independent prediction; a
// short pass-through (DIAG) window is included. The test fails if a mechanism
// never happened.
module tb_filter_platform_full;
  import filter_pkg::*;

  localparam int NTAPS  = 171;
  localparam int NM     = (NTAPS + 1) / 2;
  localparam int FRAMES = 5000;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [15:0] switches = 16'h0000;
  int   vin_uv = 2_048_000;
  logic signed [COEF_W-1:0] coef [NM];
  logic finish = 1'b0;

  int checks = 0, failures = 0;
  int c0, f0, nfilt, ndiag, ntd, ntf, nhold, nkeep, nrange;
  logic done0;

  always #5 clk = ~clk;

  platform_harness #(.DEFAULTS(1'b1), .NTAPS(NTAPS), .RESAMPLE(1'b1)) h_default (
    .clk, .reset, .switches, .vin_uv, .coef, .finish, .settle(4100),
    .checks(c0), .failures(f0), .n_filt(nfilt), .n_diag(ndiag),
    .n_to_diag(ntd), .n_to_filt(ntf), .n_hold(nhold), .n_keep(nkeep),
    .n_range(nrange), .done(done0)
  );

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  initial begin
    for (int k = 0; k < NM; k++) coef[k] = 16'(int'($urandom_range(0, 180)) - 90);
    repeat (20) @(negedge clk);
    reset = 1'b0;
    for (int f = 0; f < FRAMES; f++) begin
      repeat (50) @(negedge clk);
      vin_uv = 1_000_000 + int'($urandom_range(0, 2_000_000));
      if      (f == 4500) switches = 16'h0001;
      else if (f == 4600) switches = 16'h0000;
      repeat (50) @(negedge clk);
    end
    finish = 1'b1;
    wait (done0);
    checks   += c0;
    failures += f0;
    $display("default platform: %0d checks, %0d failures", c0, f0);
    need("ADC range set-up",     nrange);
    need("filtered frames",      nfilt);
    need("pass-through frames",  ndiag);
    need("switch to DIAG",       ntd);
    need("switch back to FILT",  ntf);
    need("samples kept by down-sampler", nkeep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 100 + 20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
