// addsub_const -- adds or subtracts the mid-scale DC offset.
//
// The analog input is biased to 2.048 V, half the reference, which the scaled
// ADC code represents as 32768. Before filtering that bias is subtracted
// (SUBTRACT = 1) so the filter sees a signal centred on zero; after filtering
// it is added back (SUBTRACT = 0) for the unipolar DAC. The operand is in the
// internal fixed-point format: OFFSET is in integer units and is shifted left
// by FRAC_W. The result saturates at the limits of the format (this design's
// choice; the offsets never push a valid signal there).
//
// Timing: one register, loaded when ce is high. Reset is asynchronous, active
// low, and clears the output.
module addsub_const
  import filter_pkg::*;
#(
  parameter bit SUBTRACT = 1'b1,
  parameter int OFFSET   = OFFSET_CODE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  sig_t d,
  output sig_t q
);

  localparam logic signed [63:0] OFS = 64'(OFFSET) <<< FRAC_W;

  logic signed [63:0] sum;

  always_comb sum = SUBTRACT ? (64'(d) - OFS) : (64'(d) + OFS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ce) q <= sat_sig(sum);
  end

endmodule
