// system_controller -- sequencing state machine of the platform.
//
// The controller advances once per sample period, on the 1 MHz tick. After
// reset it is in INIT, where it puts the ADC's "write range register" command
// (0xD014000B: register 0x14 = 0x000B, input range 0 .. 5.12 V) into the ADC
// transmit word, then moves on to FILT unconditionally. In FILT the ADC word is
// the no-operation read command and the DAC receives the filter output. In
// DIAG the DAC receives the raw ADC sample instead, bypassing the filter, which
// lets the analog path be checked on its own. The switches pick the mode: all
// switches off selects FILT, only switch 0 on selects DIAG, and any other
// setting keeps the current mode. led mirrors the switches. All of this
// follows the platform; the registered outputs' reset values are this
// design's choice.
//
// Interface: adc_rx is the last 32-bit frame read from the ADC; its bits
// ADC_RX_MSB downto ADC_RX_MSB-15 hold the conversion result. filt_code is the
// filter output. adc_tx and dac_tx are the words the two SPI links send next.
// Timing: all outputs are registers updated on tick. Reset is asynchronous,
// active low, and returns the controller to INIT.
module system_controller
  import filter_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic [15:0]         switches,
  input  logic [31:0]         adc_rx,
  input  logic [SAMPLE_W-1:0] filt_code,
  output logic [31:0]         adc_tx,
  output logic [SAMPLE_W-1:0] dac_tx,
  output ctrl_state_t         state,
  output logic [15:0]         led
);

  logic [SAMPLE_W-1:0] raw_code;

  assign raw_code = adc_rx[ADC_RX_MSB -: SAMPLE_W];
  assign led      = switches;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_INIT;
      adc_tx <= ADC_CMD_NOP;
      dac_tx <= '0;
    end else if (tick) begin
      unique case (state)
        ST_INIT: begin
          adc_tx <= ADC_CMD_RANGE;
          state  <= ST_FILT;
        end
        ST_FILT: begin
          adc_tx <= ADC_CMD_NOP;
          dac_tx <= filt_code;
          if (switches == 16'h0001)      state <= ST_DIAG;
          else if (switches == 16'h0000) state <= ST_FILT;
        end
        ST_DIAG: begin
          adc_tx <= ADC_CMD_NOP;
          dac_tx <= raw_code;
          if (switches == 16'h0001)      state <= ST_DIAG;
          else if (switches == 16'h0000) state <= ST_FILT;
        end
        default: state <= ST_INIT;
      endcase
    end
  end

endmodule
