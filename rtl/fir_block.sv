// fir_block -- the filter path between the ADC sample and the DAC code.
//
// The ADC code goes through a chain of one-register stages, all stepping on
// the 1 MHz sample strobe ce:
//   cmult (x1.25, restores the 0 .. 4.096 V span)
//   -> addsub_const (subtract the 32768 mid-scale bias)
//   -> negate (undo the inverting input buffer)
//   -> [down_sample to 44.1 kSPS] -> fir_symmetric -> [up_sample to 1 MSPS]
//   -> addsub_const (add the bias back)
//   -> bit_basher (16 integer bits for the DAC).
// Everything up to the bit selection is signed fixed point with FRAC_W
// fractional bits. With RESAMPLE = 1 (the default, the audio configuration)
// the FIR filter runs at 44.1 kSPS between a down-sampler and an up-sampler;
// with RESAMPLE = 0 it runs at the full 1 MSPS and the two rate blocks are left
// out. The stage order and constants follow the platform; the fixed-point
// format is this design's choice.
//
// Interface: code_in is sampled on ce; code_out is the DAC code. coef holds
// the FIR coefficients (see fir_symmetric).
// Timing: at RESAMPLE = 0 every stage adds one sample, six in all, so
// code_out reflects code_in of six samples earlier. At RESAMPLE = 1 the FIR
// filter only steps on kept samples and the latency varies with the
// down-sampler's phase. Reset is asynchronous, active low.
module fir_block
  import filter_pkg::*;
#(
  parameter int NTAPS    = 171,
  parameter int NMULT    = (NTAPS + 1) / 2,
  parameter bit RESAMPLE = 1'b1,
  parameter int RATE_NUM = 441,
  parameter int RATE_DEN = 10000
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ce,
  input  logic [SAMPLE_W-1:0]      code_in,
  input  logic signed [COEF_W-1:0] coef [NMULT],
  output logic [SAMPLE_W-1:0]      code_out
);

  sig_t scaled, centred, upright, fir_in, fir_out, fir_held, rebiased;
  logic fir_ce, fir_valid;

  cmult u_cmult (
    .clk, .rst_n, .ce, .code(code_in), .q(scaled)
  );

  addsub_const #(.SUBTRACT(1'b1)) u_remove_bias (
    .clk, .rst_n, .ce, .d(scaled), .q(centred)
  );

  negate u_negate (
    .clk, .rst_n, .ce, .d(centred), .q(upright)
  );

  if (RESAMPLE) begin : g_resample
    down_sample #(.RATE_NUM(RATE_NUM), .RATE_DEN(RATE_DEN)) u_down (
      .clk, .rst_n, .ce, .d(upright), .q(fir_in), .ce_out(fir_ce)
    );
  end else begin : g_full_rate
    assign fir_in = upright;
    assign fir_ce = ce;
  end

  fir_symmetric #(.NTAPS(NTAPS), .NMULT(NMULT)) u_fir (
    .clk, .rst_n, .ce(fir_ce), .d(fir_in), .coef, .q(fir_out), .q_valid(fir_valid)
  );

  if (RESAMPLE) begin : g_up
    up_sample u_up (
      .clk, .rst_n, .ce, .new_in(fir_valid), .d(fir_out), .q(fir_held)
    );
  end else begin : g_no_up
    assign fir_held = fir_out;
  end

  addsub_const #(.SUBTRACT(1'b0)) u_restore_bias (
    .clk, .rst_n, .ce, .d(fir_held), .q(rebiased)
  );

  bit_basher u_basher (
    .clk, .rst_n, .ce, .d(rebiased), .code(code_out)
  );

endmodule
