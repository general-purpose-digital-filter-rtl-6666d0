// bit_basher -- keeps the integer bits of the result for the DAC.
//
// The filtered, re-biased signal is a fixed-point number with FRAC_W
// fractional bits. The DAC takes a 16-bit unsigned code, so this block drops
// the fraction (truncation) and keeps the 16 integer bits above it. It is a
// pure bit selection, as in the platform: a value outside 0 .. 65535 wraps
// instead of clipping.
//
// Timing: one register, loaded when ce is high. Reset is asynchronous, active
// low, and clears the output.
module bit_basher
  import filter_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  sig_t                d,
  output logic [SAMPLE_W-1:0] code
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  code <= '0;
    else if (ce) code <= d[FRAC_W +: SAMPLE_W];
  end

endmodule
