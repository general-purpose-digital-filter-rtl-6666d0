// filter_platform_top -- FPGA logic of the general-purpose filter platform.
//
// The board digitises one analog channel with an SPI ADC at 1 MSPS, filters
// it with a wide, fully parallel FIR filter and plays the result through an
// SPI DAC. This module holds the digital part: the clock divider makes the
// 1 MHz sample strobe from the 100 MHz board clock; on each strobe the
// system controller chooses the next ADC command and DAC word, the ADC link
// (32-bit frames) reads the latest conversion while sending the command, the
// DAC link (16-bit frames) sends the chosen code, and the filter path steps
// one sample. Both links run in SPI mode 0 with a 50 MHz serial clock
// (clk_div = 1). Switch 0 alone puts the platform in pass-through
// (diagnostic) mode; the LEDs show the switches.
//
// The structure, the ADC command words, the frame widths and the SPI
// settings follow the platform. Bringing the FIR coefficients in as a port,
// rather than fixing them at build time, is this design's choice.
//
// Ports: clk is the 100 MHz board clock, reset an asynchronous active-high
// reset (push button). adc_* and dac_* are the SPI pins to the converters.
// Timing: one ADC frame and one DAC frame per 1 µs sample period.
//
// Lint notes: the divided 1 MHz clock and the controller state are left
// unconnected on purpose (only the tick strobe drives logic; the state is
// there for the testbenches to observe). The reset is also read by the
// assertions' disable condition, which lint reports as a synchronous use of an
// asynchronous reset; no flip-flop uses it that way.
module filter_platform_top
  import filter_pkg::*;
#(
  parameter int NTAPS       = 171,
  parameter int NMULT       = (NTAPS + 1) / 2,
  parameter bit RESAMPLE    = 1'b1,
  parameter int HALF_PERIOD = 50
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [15:0]              switches,
  output logic [15:0]              led,
  input  logic signed [COEF_W-1:0] coef [NMULT],
  output logic                     adc_sclk,
  output logic                     adc_cs_n,
  output logic                     adc_mosi,
  input  logic                     adc_miso,
  output logic                     dac_sclk,
  output logic                     dac_cs_n,
  output logic                     dac_mosi
);

  logic                rst_n;
  logic                sample_clk, tick;
  logic [31:0]         adc_tx, adc_rx;
  logic [SAMPLE_W-1:0] dac_tx, filt_code;
  logic                adc_busy, dac_busy;
  logic [15:0]         dac_rx_unused;
  ctrl_state_t         state;

  assign rst_n = ~reset;

  clock_divider #(.HALF_PERIOD(HALF_PERIOD)) u_clkdiv (
    .clk, .rst_n, .clk_out(sample_clk), .tick
  );

  system_controller u_ctrl (
    .clk, .rst_n, .tick, .switches,
    .adc_rx, .filt_code, .adc_tx, .dac_tx, .state, .led
  );

  spi_master #(.SLAVES(1), .D_WIDTH(32)) u_adc_spi (
    .clk, .rst_n, .enable(tick), .cpol(1'b0), .cpha(1'b0), .cont(1'b0), .clk_div(16'd1),
    .addr(32'd0), .tx_data(adc_tx), .miso(adc_miso),
    .sclk(adc_sclk), .ss_n(adc_cs_n), .mosi(adc_mosi), .busy(adc_busy),
    .rx_data(adc_rx)
  );

  spi_master #(.SLAVES(1), .D_WIDTH(16)) u_dac_spi (
    .clk, .rst_n, .enable(tick), .cpol(1'b0), .cpha(1'b0), .cont(1'b0), .clk_div(16'd1),
    .addr(32'd0), .tx_data(dac_tx), .miso(1'b0),
    .sclk(dac_sclk), .ss_n(dac_cs_n), .mosi(dac_mosi), .busy(dac_busy),
    .rx_data(dac_rx_unused)
  );

  fir_block #(.NTAPS(NTAPS), .NMULT(NMULT), .RESAMPLE(RESAMPLE)) u_filter (
    .clk, .rst_n, .ce(tick), .code_in(adc_rx[ADC_RX_MSB -: SAMPLE_W]),
    .coef, .code_out(filt_code)
  );

  // A new frame starts every sample period, so each link must be idle again
  // when the next tick arrives.
  a_adc_frame_fits: assert property (@(posedge clk) disable iff (!rst_n) tick |-> !adc_busy);
  a_dac_frame_fits: assert property (@(posedge clk) disable iff (!rst_n) tick |-> !dac_busy);

endmodule
