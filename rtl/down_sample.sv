// down_sample -- lowers the 1 MSPS stream to the 44.1 kSPS filter rate.
//
// In the audio configuration the FIR filter runs at 44.1 kSPS while the ADC
// and DAC keep their 1 MSPS frame rate. 1 MHz / 44.1 kHz is not an integer,
// so this block keeps input samples by a fractional rate: a phase accumulator
// gains RATE_NUM on every input sample and, whenever it reaches RATE_DEN, wraps
// and keeps that sample. With 441/10000 it keeps exactly 441 of every 10000
// samples, 44.1 kSPS on average, with a spacing of 22 or 23 input samples.
// Kept samples are not low-pass filtered first (like a plain down-sampler);
// the fractional accumulator is this design's choice, the rate is the
// platform's.
//
// Interface: ce marks an input sample. When a sample is kept, q is loaded
// and ce_out pulses for one clock cycle right after (the kept sample is on q
// during that pulse). Reset is asynchronous, active low.
module down_sample
  import filter_pkg::*;
#(
  parameter int RATE_NUM = 441,
  parameter int RATE_DEN = 10000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  sig_t d,
  output sig_t q,
  output logic ce_out
);

  localparam int AW = $clog2(RATE_DEN + RATE_NUM + 1);

  logic [AW-1:0] acc;
  logic [AW-1:0] acc_next;
  logic          keep;

  always_comb begin
    acc_next = acc + AW'(RATE_NUM);
    keep     = (acc_next >= AW'(RATE_DEN));
    if (keep) acc_next = acc_next - AW'(RATE_DEN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      q      <= '0;
      ce_out <= 1'b0;
    end else begin
      ce_out <= 1'b0;
      if (ce) begin
        acc <= acc_next;
        if (keep) begin
          q      <= d;
          ce_out <= 1'b1;
        end
      end
    end
  end

endmodule
