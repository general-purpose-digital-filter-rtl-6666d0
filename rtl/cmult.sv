// cmult -- constant multiplier that rescales the ADC code by 1.25.
//
// With the ADC set to its 0 .. 5.12 V range, a 4.096 V input (the full
// reference) reads as only 4.096/5.12 of full scale. Multiplying the code by
// 1.25 restores a 16-bit span for 0 .. 4.096 V. The product is kept exactly:
// the output is in the internal signed fixed-point format (FRAC_W fractional
// bits), so the gain is GAIN_Q / 2**FRAC_W with GAIN_Q = 5 for 1.25. The gain
// follows the platform; the exact (unrounded) fixed-point result is this
// design's choice.
//
// Timing: one register, loaded when ce is high (one sample of latency at the
// sample rate). Reset is asynchronous, active low, and clears the output.
module cmult
  import filter_pkg::*;
#(
  parameter int GAIN_Q = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [SAMPLE_W-1:0] code,
  output sig_t                q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= sat_sig(64'(code) * 64'(GAIN_Q));
  end

endmodule
