// fir_symmetric -- fully parallel, linear-phase FIR filter.
//
// The filter computes y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k] for a
// symmetric impulse response, h[k] = h[NTAPS-1-k]. Every term is computed in
// the same clock cycle, with one multiplier per coefficient pair: the two
// samples that share a coefficient are added first, so NTAPS taps need only
// NMULT = (NTAPS+1)/2 multipliers. The default of 171 taps on 86 multipliers
// is the largest filter the platform's FPGA (90 DSP multipliers, 4 of them
// spent on signal conditioning) can hold. A shorter symmetric filter is run by
// centring it in the 171 taps and setting the outer coefficients to zero.
//
// Interface: coef[k] is h[k] = h[NTAPS-1-k], signed with COEF_FRAC fractional
// bits (Q1.15); they are inputs so the filter can be re-targeted without
// changing the RTL. d and q use the internal fixed-point signal format. The
// sum is exact; it is rounded (half up) to the input format and saturated.
// The coefficient and rounding formats are this design's choice.
//
// Timing: on a clock with ce high the new sample x[n] enters and q is loaded
// with y[n], so the block adds one sample period of latency; q_valid pulses
// on the following clock cycle. Reset (asynchronous, active low) clears the
// delay line and the output.
module fir_symmetric
  import filter_pkg::*;
#(
  parameter int NTAPS = 171,
  parameter int NMULT = (NTAPS + 1) / 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ce,
  input  sig_t                      d,
  input  logic signed [COEF_W-1:0]  coef [NMULT],
  output sig_t                      q,
  output logic                      q_valid
);

  localparam int PRE_W = SIG_W + 1;
  localparam int PROD_W = PRE_W + COEF_W;
  localparam int ACC_W = PROD_W + $clog2(NMULT + 1);

  sig_t                     dline [NTAPS-1];   // x[n-1] .. x[n-NTAPS+1]
  sig_t                     taps  [NTAPS];     // x[n]   .. x[n-NTAPS+1]
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  rounded;

  always_comb begin
    taps[0] = d;
    for (int i = 1; i < NTAPS; i++) taps[i] = dline[i-1];
  end

  always_comb begin
    logic signed [PRE_W-1:0] pre;
    acc = '0;
    for (int k = 0; k < NMULT; k++) begin
      if (k == NTAPS - 1 - k) pre = PRE_W'(taps[k]);                     // centre tap
      else                    pre = PRE_W'(taps[k]) + PRE_W'(taps[NTAPS-1-k]);
      acc = acc + ACC_W'(pre * coef[k]);
    end
    rounded = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS - 1; i++) dline[i] <= '0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= ce;
      if (ce) begin
        dline[0] <= d;
        for (int i = 1; i < NTAPS - 1; i++) dline[i] <= dline[i-1];
        q <= sat_sig(64'(rounded));
      end
    end
  end

endmodule
