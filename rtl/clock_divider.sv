// clock_divider -- derives the 1 MHz sample clock from the 100 MHz board clock.
//
// A counter runs from 0 to HALF_PERIOD-1 and the output clock inverts every time
// it wraps, so clk_out has a period of 2*HALF_PERIOD input cycles (100 cycles,
// 1 MHz, with the default of 50 input cycles per half period, as the platform
// uses). Besides the divided clock the module gives a one-cycle strobe, tick,
// on the input cycle in which clk_out rises; the rest of the design runs on the
// board clock and uses tick as a clock enable, instead of clocking logic from a
// generated clock (this design's choice).
//
// Reset is asynchronous and active low: counter and clk_out go to zero.
// Timing: the first tick comes HALF_PERIOD cycles after reset is released,
// then one every 2*HALF_PERIOD cycles.
module clock_divider #(
  parameter int HALF_PERIOD = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);

  localparam int CW = (HALF_PERIOD > 1) ? $clog2(HALF_PERIOD) : 1;

  logic [CW-1:0] count;
  logic          wrap;

  assign wrap = (count == CW'(HALF_PERIOD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      clk_out <= 1'b0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (wrap) begin
        count   <= '0;
        clk_out <= ~clk_out;
        tick    <= ~clk_out;    // rising edge of the divided clock
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
