// tb_filter_platform_top -- end-to-end test of the filter platform.
//
// Two small platforms run side by side from the same analog input and
// switches: one with the FIR filter at the full 1 MSPS rate, one in the
// 44.1 kSPS audio configuration with down- and up-sampling. Both have 7-tap
// filters with random symmetric coefficients. The input voltage is a new
// random value in 1.0 .. 3.0 V every sample. The switches walk the
// controller through FILT, DIAG (switch 0), a setting that must hold DIAG
// (switches 0 and 1), and back to FILT. Each platform's harness predicts
// every DAC frame from the ADC conversions and counts mismatches; the test
// also fails if a mechanism (range set-up, both modes, both mode changes,
// the hold, the down-sampler) never happened.
module tb_filter_platform_top;
  import filter_pkg::*;

  localparam int NTAPS = 7;
  localparam int NM    = (NTAPS + 1) / 2;
  localparam int FRAMES = 1400;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic [15:0] switches = 16'h0000;
  int   vin_uv = 2_048_000;
  logic signed [COEF_W-1:0] coef [NM];
  logic finish = 1'b0;

  int checks = 0, failures = 0;
  int c0, f0, c1, f1;
  int nfilt0, ndiag0, ntd0, ntf0, nhold0, nkeep0, nrange0;
  int nfilt1, ndiag1, ntd1, ntf1, nhold1, nkeep1, nrange1;
  logic done0, done1;

  always #5 clk = ~clk;   // 100 MHz board clock

  platform_harness #(.NTAPS(NTAPS), .RESAMPLE(1'b0)) h_full (
    .clk, .reset, .switches, .vin_uv, .coef, .finish, .settle(40),
    .checks(c0), .failures(f0), .n_filt(nfilt0), .n_diag(ndiag0),
    .n_to_diag(ntd0), .n_to_filt(ntf0), .n_hold(nhold0), .n_keep(nkeep0),
    .n_range(nrange0), .done(done0)
  );

  platform_harness #(.NTAPS(NTAPS), .RESAMPLE(1'b1)) h_audio (
    .clk, .reset, .switches, .vin_uv, .coef, .finish, .settle(250),
    .checks(c1), .failures(f1), .n_filt(nfilt1), .n_diag(ndiag1),
    .n_to_diag(ntd1), .n_to_filt(ntf1), .n_hold(nhold1), .n_keep(nkeep1),
    .n_range(nrange1), .done(done1)
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
    for (int k = 0; k < NM; k++) coef[k] = 16'(int'($urandom_range(0, 8000)) - 4000);
    repeat (20) @(negedge clk);
    reset = 1'b0;
    for (int f = 0; f < FRAMES; f++) begin
      // new input level and switch setting half-way through each frame
      repeat (50) @(negedge clk);
      vin_uv = 1_000_000 + int'($urandom_range(0, 2_000_000));
      if      (f == 800)  switches = 16'h0001;   // DIAG
      else if (f == 900)  switches = 16'h0003;   // no change allowed
      else if (f == 1000) switches = 16'h0000;   // FILT
      repeat (50) @(negedge clk);
    end
    finish = 1'b1;
    wait (done0 && done1);
    checks   += c0 + c1;
    failures += f0 + f1;
    $display("full-rate platform: %0d checks, %0d failures", c0, f0);
    $display("audio platform:     %0d checks, %0d failures", c1, f1);
    need("ADC range set-up",        nrange0 + nrange1);
    need("filtered frames (1 MSPS)", nfilt0);
    need("filtered frames (audio)",  nfilt1);
    need("pass-through frames",      ndiag0 + ndiag1);
    need("switch to DIAG",           ntd0 + ntd1);
    need("switch back to FILT",      ntf0 + ntf1);
    need("mode held by other setting", nhold0 + nhold1);
    need("samples kept by down-sampler", nkeep1);
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
