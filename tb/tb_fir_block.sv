// tb_fir_block -- checks the complete filter path between ADC and DAC codes.
//
// Two 9-tap instances with the same random coefficients: one at the full
// sample rate, one with the 44.1 kSPS down- and up-sampling. Random ADC codes
// in the valid 0 .. 4.096 V span arrive on a 1-in-4-clock ce. A reference
// written here from the block description (x1.25, minus 32768, negate, FIR,
// plus 32768, keep integer bits) predicts each output: at full rate the
// output after sample n must come from input n-5, i.e. six register stages;
// in the audio configuration the filter sees only the samples the
// 441/10000 accumulator keeps and the held filter output reaches code_out two
// samples later. A DC input must come out at the expected level.
module tb_fir_block;
  import filter_pkg::*;

  localparam int NT = 9, NM = (NT + 1) / 2;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [15:0] code_in = '0, out_full, out_audio;
  logic signed [COEF_W-1:0] coef [NM];
  int checks = 0, failures = 0;
  longint x [$];

  always #5 clk = ~clk;

  fir_block #(.NTAPS(NT), .RESAMPLE(1'b0)) u_full (.clk, .rst_n, .ce, .code_in, .coef, .code_out(out_full));
  fir_block #(.NTAPS(NT), .RESAMPLE(1'b1)) u_audio (.clk, .rst_n, .ce, .code_in, .coef, .code_out(out_audio));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  function automatic longint h(int t);
    return longint'(coef[(t < NM) ? t : NT - 1 - t]);
  endfunction

  // value at the FIR input for input sample m (after scale, bias, negate)
  function automatic longint cond(int m);
    return (m >= 0) ? 131072 - 5 * x[m] : 0;
  endfunction

  function automatic longint fir_at(longint s [$]);
    longint acc = 0;
    for (int t = 0; t < NT; t++) if (s.size() - 1 - t >= 0) acc += h(t) * s[s.size() - 1 - t];
    acc = (acc + 16384) >>> 15;
    if (acc > 524287) acc = 524287;
    if (acc < -524288) acc = -524288;
    return acc;
  endfunction

  function automatic longint dac(longint y);
    return ((y + 131072) >>> 2) & 16'hFFFF;
  endfunction

  longint s_full [$];
  longint s_aud [$];
  longint y_full [$];   // FIR output after input sample n (full rate)
  longint y_aud [$];    // latest audio FIR output after input sample n

  initial begin
    for (int k = 0; k < NM; k++) coef[k] = 16'(int'($urandom_range(0, 7000)) - 3500);
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      longint v;
      bit kept;
      v = (n >= 2500) ? 40000 : longint'($urandom_range(0, 52428));
      x.push_back(v);
      code_in = 16'(v);
      ce = 1'b1;
      @(posedge clk); #1;
      ce = 1'b0;
      repeat (3) @(posedge clk);
      #1;
      // reference: the FIR input at tick n is the conditioned sample n-3
      s_full.push_back(cond(n - 3));
      y_full.push_back(fir_at(s_full));
      kept = ((longint'(n + 1) * 441) / 10000) != ((longint'(n) * 441) / 10000);
      if (kept) s_aud.push_back(cond(n - 3));
      y_aud.push_back(fir_at(s_aud));
      if (n >= 20) begin
        check(longint'(out_full) == dac(y_full[n - 2]),
              $sformatf("full rate sample %0d: %0d expected %0d", n, out_full, dac(y_full[n - 2])));
        check(longint'(out_audio) == dac(y_aud[n - 3]),
              $sformatf("audio sample %0d: %0d expected %0d", n, out_audio, dac(y_aud[n - 3])));
      end
    end
    // DC input 40000 -> FIR input 131072 - 200000 = -68928 times the DC gain
    begin
      longint g = 0;
      for (int t = 0; t < NT; t++) g += h(t);
      check(longint'(out_full) == dac(fir_at('{-68928, -68928, -68928, -68928, -68928, -68928, -68928, -68928, -68928})),
            "DC level at full rate");
      check(out_audio == out_full, "DC level equal in both configurations");
      $display("  DC gain %0d/32768, output %0d", g, out_full);
    end
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
