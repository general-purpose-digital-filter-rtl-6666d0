// filter_pkg -- shared constants and types of the digital filter platform.
//
// The platform digitises one analog channel with a 16-bit SPI ADC, conditions
// and filters the samples inside the FPGA, and sends the result to a 16-bit SPI
// DAC. Inside the FPGA the signal travels as a signed fixed-point number with
// FRAC_W fractional bits (SIG_W bits in all), which is wide enough for the x1.25
// scaled ADC code and the offset arithmetic around the FIR filter. The ADC
// command words and the 32768 mid-scale offset follow the platform's ADC
// set-up; the fixed-point widths and the rounding are this design's choice.
package filter_pkg;

  // Sample codes exchanged with the converters.
  localparam int SAMPLE_W = 16;

  // Internal fixed-point signal: SIG_W bits, FRAC_W of them fractional.
  localparam int FRAC_W = 2;
  localparam int SIG_W  = 20;

  // FIR coefficients: signed, COEF_FRAC fractional bits (Q1.15).
  localparam int COEF_W    = 16;
  localparam int COEF_FRAC = 15;

  // Mid-scale ADC/DAC code that corresponds to the 2.048 V DC bias.
  localparam int OFFSET_CODE = 32768;

  // ADC SPI command words (32-bit frames).
  // WRITE (opcode 11010_00), register 0x14 (input range), data 0x000B:
  // unipolar 0 .. 1.25 x VREF = 0 .. 5.12 V.
  localparam logic [31:0] ADC_CMD_RANGE = 32'hD014_000B;
  localparam logic [31:0] ADC_CMD_NOP   = 32'h0000_0000;

  // The conversion result arrives in bits ADC_RX_MSB downto ADC_RX_MSB-15 of
  // the 32-bit frame read from the ADC.
  localparam int ADC_RX_MSB = 30;

  // Board clock and sample rate.
  localparam int SYS_CLK_HZ   = 100_000_000;
  localparam int SAMPLE_HZ    = 1_000_000;

  typedef logic signed [SIG_W-1:0] sig_t;

  // States of the system controller.
  typedef enum logic [1:0] {
    ST_INIT = 2'd0,   // program the ADC input range
    ST_FILT = 2'd1,   // DAC receives the filtered sample
    ST_DIAG = 2'd2    // DAC receives the raw ADC sample (pass-through)
  } ctrl_state_t;

  // Clamp a wide signed value into the internal signal format.
  function automatic sig_t sat_sig(input logic signed [63:0] v);
    localparam logic signed [63:0] MAXV = (64'sd1 <<< (SIG_W - 1)) - 1;
    localparam logic signed [63:0] MINV = -(64'sd1 <<< (SIG_W - 1));
    if (v > MAXV)      return sig_t'(MAXV);
    else if (v < MINV) return sig_t'(MINV);
    else               return sig_t'(v);
  endfunction

endpackage
