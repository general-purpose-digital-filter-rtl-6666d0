// platform_harness -- one filter platform with its converters, for the
// end-to-end testbenches.
//
// Instantiates filter_platform_top (at its own defaults when DEFAULTS is set,
// otherwise with NTAPS and RESAMPLE), an ADC model on its ADC link and a DAC
// model on its DAC link. It records, per 1 MHz frame, the switch setting seen
// by the controller. When finish rises it predicts every DAC frame from the
// ADC conversions with an independent sample-by-sample model of the signal
// path (scale, bias removal, negation, optional fractional down-sampling,
// FIR filter, hold, bias restore, bit selection), the controller's mode rules
// and a fixed link latency, compares the prediction with what the DAC model
// latched, and reports checks, failures and how often each mechanism ran.
//
// Latency model (sample periods, frame f starts at tick f): the conversion
// made at the end of frame f is read in frame f+1 and reaches the filter at
// tick f+2; a controller choice made at tick n is sent in the DAC frame that
// starts at tick n+1.
module platform_harness
  import filter_pkg::*;
#(
  parameter bit DEFAULTS = 1'b0,
  parameter int NTAPS    = 7,
  parameter bit RESAMPLE = 1'b0
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [15:0]              switches,
  input  int                       vin_uv,
  input  logic signed [COEF_W-1:0] coef [(NTAPS+1)/2],
  input  logic                     finish,
  input  int                       settle,       // frames skipped at the start
  output int                       checks,
  output int                       failures,
  output int                       n_filt,       // frames checked in FILT mode
  output int                       n_diag,       // frames checked in DIAG mode
  output int                       n_to_diag,    // FILT -> DIAG switches
  output int                       n_to_filt,    // DIAG -> FILT switches
  output int                       n_hold,       // ticks where another setting kept the mode
  output int                       n_keep,       // samples kept by the down-sampler
  output int                       n_range,      // ADC range writes
  output logic                     done
);

  localparam int NM = (NTAPS + 1) / 2;

  logic adc_sclk, adc_cs_n, adc_mosi, adc_miso;
  logic dac_sclk, dac_cs_n, dac_mosi;
  logic [15:0] led;
  logic [15:0] dac_code;

  if (DEFAULTS) begin : g_default
    filter_platform_top dut (
      .clk, .reset, .switches, .led, .coef,
      .adc_sclk, .adc_cs_n, .adc_mosi, .adc_miso,
      .dac_sclk, .dac_cs_n, .dac_mosi
    );
  end else begin : g_param
    filter_platform_top #(.NTAPS(NTAPS), .RESAMPLE(RESAMPLE)) dut (
      .clk, .reset, .switches, .led, .coef,
      .adc_sclk, .adc_cs_n, .adc_mosi, .adc_miso,
      .dac_sclk, .dac_cs_n, .dac_mosi
    );
  end

  ads8681_model u_adc (
    .cs_n(adc_cs_n), .sclk(adc_sclk), .sdi(adc_mosi), .sdo(adc_miso), .vin_uv
  );

  dac8830_model u_dac (
    .cs_n(dac_cs_n), .sclk(dac_sclk), .sdi(dac_mosi), .code(dac_code)
  );

  // Switch setting at each frame start (the controller samples it on the
  // same tick that starts the frame).
  int sw_log [int];
  int fcount;
  initial fcount = 0;
  always @(negedge adc_cs_n) begin
    fcount++;
    sw_log[fcount] = int'(switches);
  end

  int led_errors;
  initial led_errors = 0;
  always @(posedge clk) if (led !== switches) led_errors++;

  function automatic longint sat20(longint v);
    if (v > 524287)  return 524287;
    if (v < -524288) return -524288;
    return v;
  endfunction

  function automatic longint conv_at(int f);
    if (f < 1 || !u_adc.conv_log.exists(f)) return 0;
    return longint'(u_adc.conv_log[f]);
  endfunction

  function automatic longint h(int t);
    int k;
    k = (t < NM) ? t : NTAPS - 1 - t;
    return longint'(coef[k]);
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    n_filt = 0; n_diag = 0; n_to_diag = 0; n_to_filt = 0; n_hold = 0;
    n_keep = 0; n_range = 0;
    @(posedge finish);
    begin
      int     nf;
      longint negv [int];     // negate stage output after tick m
      longint y    [int];     // hold/FIR output feeding the bias adder, per tick
      longint bash [int];
      int     mode [int];     // 0 init, 1 filt, 2 diag: mode after tick n
      longint s    [$];       // samples seen by the FIR filter
      longint ycur;
      nf = u_dac.frame;
      for (int m = 1; m <= nf; m++) negv[m] = 131072 - 5 * conv_at(m - 4);
      ycur = 0;
      for (int n = 1; n <= nf; n++) begin
        bit kept;
        kept = RESAMPLE ? ((longint'(n) * 441) / 10000 != (longint'(n - 1) * 441) / 10000) : 1'b1;
        if (kept) begin
          longint acc;
          s.push_back((n >= 2) ? negv[n-1] : 0);
          if (RESAMPLE) n_keep++;
          acc = 0;
          for (int t = 0; t < NTAPS; t++)
            if (s.size() - 1 - t >= 0) acc += h(t) * s[s.size() - 1 - t];
          ycur = sat20((acc + 16384) >>> 15);
        end
        y[n] = ycur;   // FIR output after tick n
      end
      for (int n = 1; n <= nf; n++) begin
        longint v;
        int src;
        // bias adder and bit selection add two ticks; the up-sampler a third
        src = RESAMPLE ? n - 3 : n - 2;
        v = (src >= 1) ? sat20(y[src] + 131072) : 0;
        bash[n] = (v >>> 2) & 16'hFFFF;
      end
      mode[0] = 0;
      for (int n = 1; n <= nf; n++) begin
        int sw;
        sw = sw_log.exists(n) ? sw_log[n] : 0;
        if (mode[n-1] == 0) mode[n] = 1;
        else if (sw == 1) mode[n] = 2;
        else if (sw == 0) mode[n] = 1;
        else begin mode[n] = mode[n-1]; n_hold++; end
        if (mode[n-1] == 1 && mode[n] == 2) n_to_diag++;
        if (mode[n-1] == 2 && mode[n] == 1) n_to_filt++;
      end
      for (int j = settle; j < nf; j++) begin
        longint expv;
        int     md;
        md = mode[j-2];
        if (md == 1) expv = bash[j-2];
        else         expv = conv_at(j - 3);
        checks++;
        if (!u_dac.dac_log.exists(j) || longint'(u_dac.dac_log[j]) != expv) begin
          failures++;
          if (failures <= 10)
            $display("  frame %0d mode %0d: DAC got %0d, expected %0d", j, md,
                     u_dac.dac_log.exists(j) ? u_dac.dac_log[j] : -1, expv);
        end
        if (md == 1) n_filt++;
        else         n_diag++;
      end
      // converter protocol and the range set-up
      n_range = u_adc.range_writes;
      checks++;
      if (u_adc.range_writes != 1 || u_adc.range_sel != 4'hB) begin
        failures++;
        $display("  ADC range writes %0d, range %h", u_adc.range_writes, u_adc.range_sel);
      end
      checks++;
      if (u_dac.bad_frames != 0) begin
        failures++;
        $display("  %0d malformed DAC frames", u_dac.bad_frames);
      end
      checks++;
      if (led_errors != 0) begin
        failures++;
        $display("  LED differed from switches on %0d cycles", led_errors);
      end
    end
    done = 1;
  end

endmodule
