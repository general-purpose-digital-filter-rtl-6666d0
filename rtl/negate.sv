// negate -- undoes the sign inversion of the analog input buffer.
//
// The input stage on the board is a unity-gain inverting amplifier, so the
// digitised signal arrives upside down. This block multiplies the offset-free
// signal by -1. The most negative value of the format has no positive
// counterpart and saturates to the largest positive value (this design's
// choice).
//
// Timing: one register, loaded when ce is high. Reset is asynchronous, active
// low, and clears the output.
module negate
  import filter_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  sig_t d,
  output sig_t q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= sat_sig(-64'(d));
  end

endmodule
