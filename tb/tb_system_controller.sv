// tb_system_controller -- checks the init / filter / diagnostic sequencer.
//
// A reference state machine written here from the mode rules is stepped on
// each tick alongside the controller. Between ticks the switches, the ADC
// frame and the filter code change at random (switch values are drawn mostly
// from 0, 1 and other settings). After each tick: the first tick must send the
// range command 0xD014000B and enter FILT; later ticks the no-op read command;
// in FILT the DAC word is the filter code, in DIAG bits 30..15 of the ADC
// frame; switch value 1 selects DIAG, 0 selects FILT, anything else keeps the
// mode. Without a tick nothing may change. led must follow the switches.
module tb_system_controller;
  import filter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0;
  logic [15:0] switches = '0;
  logic [31:0] adc_rx = '0;
  logic [15:0] filt_code = '0;
  logic [31:0] adc_tx;
  logic [15:0] dac_tx, led;
  ctrl_state_t state;
  int checks = 0, failures = 0;
  int n_diag = 0, n_filt = 0, n_hold = 0;

  always #5 clk = ~clk;

  system_controller dut (.clk, .rst_n, .tick, .switches, .adc_rx, .filt_code,
                         .adc_tx, .dac_tx, .state, .led);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int          m;            // reference mode: 0 init, 1 filt, 2 diag
    logic [15:0] exp_dac;
    repeat (2) @(posedge clk); #1;
    check(state == ST_INIT && adc_tx == 32'h0 && dac_tx == 16'h0, "reset values");
    rst_n = 1'b1;
    m = 0; exp_dac = '0;
    for (int n = 0; n < 2000; n++) begin
      logic [31:0] tx_prev;
      logic [15:0] dac_prev;
      int r;
      r = int'($urandom_range(0, 9));
      switches  = (r < 4) ? 16'h0000 : (r < 8) ? 16'h0001 : 16'($urandom_range(2, 65535));
      adc_rx    = $urandom;
      filt_code = 16'($urandom);
      tx_prev = adc_tx; dac_prev = dac_tx;
      repeat (3) begin
        @(posedge clk); #1;
        check(adc_tx == tx_prev && dac_tx == dac_prev, "no change without tick");
        check(led == switches, "led follows switches");
      end
      // reference step
      case (m)
        0: m = 1;
        default: begin
          exp_dac = (m == 1) ? filt_code : adc_rx[30:15];
          if (switches == 16'h0001) m = 2;
          else if (switches == 16'h0000) m = 1;
          else n_hold++;
        end
      endcase
      tick = 1'b1;
      @(posedge clk); #1;
      tick = 1'b0;
      check(adc_tx == ((n == 0) ? 32'hD014_000B : 32'h0000_0000),
            $sformatf("tick %0d: adc_tx %h", n, adc_tx));
      check(dac_tx == exp_dac, $sformatf("tick %0d: dac_tx %h expected %h", n, dac_tx, exp_dac));
      check(int'(state) == m, $sformatf("tick %0d: state %0d expected %0d", n, state, m));
      if (m == 2) n_diag++; else if (m == 1) n_filt++;
    end
    check(n_diag > 0 && n_filt > 0 && n_hold > 0, "all modes visited");
    $display("  FILT %0d, DIAG %0d, held %0d", n_filt, n_diag, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
