// up_sample -- returns the 44.1 kSPS filter output to the 1 MSPS DAC stream.
//
// On every fast sample (ce) the output takes a new value. With COPY_SAMPLES
// set (the default) it repeats the latest slow-rate sample, a zero-order hold
// that keeps the signal level; otherwise it emits the new slow sample once, on
// the first fast sample after it arrived (new_in), and zero on the others
// (zero insertion, which scales the level by the rate ratio). The choice of a
// hold as default is this design's; the platform only names the block.
//
// Interface: new_in pulses when d carries a new slow-rate sample; ce marks the
// fast output samples. Timing: one register, loaded when ce is high. Reset is
// asynchronous, active low.
module up_sample
  import filter_pkg::*;
#(
  parameter bit COPY_SAMPLES = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic new_in,
  input  sig_t d,
  output sig_t q
);

  logic fresh;   // a slow sample arrived since the last fast output

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q     <= '0;
      fresh <= 1'b0;
    end else begin
      if (new_in) fresh <= 1'b1;
      if (ce) begin
        if (COPY_SAMPLES || fresh || new_in) q <= d;
        else                                 q <= '0;
        fresh <= 1'b0;
      end
    end
  end

endmodule
