// tb_filter_workloads -- the three filters measured on the platform.
//
// Each filter runs on its own full-size platform (171-tap capacity), driven by
// a sum of test tones, and is judged by the tones' amplitudes at the DAC:
//   band-pass, order 56 (57 taps, 29 multipliers), 44.1 kSPS, transition bands
//     1-3 kHz and 9-11 kHz: tones at 500 Hz (stop), 6 kHz (pass), 15 kHz (stop);
//   band-stop, order 152 (153 taps, 77 multipliers), 44.1 kSPS, transition
//     bands 3-3.8 kHz and 4.2-5 kHz: tones at 1 kHz and 8 kHz (pass), 4 kHz (stop);
//   high-pass, order 156 (157 taps, 79 multipliers), 1 MSPS (no resampling),
//     transition band 400 Hz - 10 kHz: tones at 200 Hz (stop), 50 kHz (pass).
// The coefficients are designed here by the Kaiser-window method at those
// orders and band edges (cut-offs in the middle of each transition band, the
// window's beta chosen for the attenuation that order and transition width
// can reach) and rounded to Q1.15; a shorter filter is centred in the 171
// taps. Every DAC frame is also checked exactly against the harness's
// prediction. Pass-band tones must come through within 1.5 dB, stop-band
// tones must be attenuated by at least 30 dB (25 dB for the high-pass, whose
// order and transition width allow about 30 dB with a window design).
module tb_filter_workloads;
  import filter_pkg::*;

  localparam int NT = 171, NM = (NT + 1) / 2;
  localparam int WIN = 10000;              // measurement window, frames (10 ms)
  localparam real PI = 3.14159265358979;
  localparam real CODES_PER_V = 16000.0;   // 65536/5.12 V, times 1.25

  logic clk = 1'b0, reset = 1'b1;
  logic [15:0] switches = 16'h0000;
  logic finish = 1'b0;
  int vin_bp = 2_048_000, vin_bs = 2_048_000, vin_hp = 2_048_000;
  logic signed [COEF_W-1:0] c_bp [NM];
  logic signed [COEF_W-1:0] c_bs [NM];
  logic signed [COEF_W-1:0] c_hp [NM];
  int checks = 0, failures = 0;

  int ck [3], fl [3], nf [3], nd [3], ntd [3], ntf [3], nh [3], nk [3], nr [3];
  logic dn [3];

  always #5 clk = ~clk;

  platform_harness #(.DEFAULTS(1'b1), .NTAPS(NT), .RESAMPLE(1'b1)) h_bp (
    .clk, .reset, .switches, .vin_uv(vin_bp), .coef(c_bp), .finish, .settle(4100),
    .checks(ck[0]), .failures(fl[0]), .n_filt(nf[0]), .n_diag(nd[0]), .n_to_diag(ntd[0]),
    .n_to_filt(ntf[0]), .n_hold(nh[0]), .n_keep(nk[0]), .n_range(nr[0]), .done(dn[0]));
  platform_harness #(.DEFAULTS(1'b1), .NTAPS(NT), .RESAMPLE(1'b1)) h_bs (
    .clk, .reset, .switches, .vin_uv(vin_bs), .coef(c_bs), .finish, .settle(4100),
    .checks(ck[1]), .failures(fl[1]), .n_filt(nf[1]), .n_diag(nd[1]), .n_to_diag(ntd[1]),
    .n_to_filt(ntf[1]), .n_hold(nh[1]), .n_keep(nk[1]), .n_range(nr[1]), .done(dn[1]));
  platform_harness #(.DEFAULTS(1'b0), .NTAPS(NT), .RESAMPLE(1'b0)) h_hp (
    .clk, .reset, .switches, .vin_uv(vin_hp), .coef(c_hp), .finish, .settle(300),
    .checks(ck[2]), .failures(fl[2]), .n_filt(nf[2]), .n_diag(nd[2]), .n_to_diag(ntd[2]),
    .n_to_filt(ntf[2]), .n_hold(nh[2]), .n_keep(nk[2]), .n_range(nr[2]), .done(dn[2]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real bessel_i0(real x);
    real term = 1.0, sum = 1.0;
    for (int k = 1; k < 60; k++) begin
      term = term * (x / (2.0 * k)) * (x / (2.0 * k));
      sum += term;
    end
    return sum;
  endfunction

  // ideal low-pass impulse response, cut-off fc, sample rate fs, offset m
  function automatic real lp(int m, real fc, real fs);
    if (m == 0) return 2.0 * fc / fs;
    return $sin(2.0 * PI * fc * m / fs) / (PI * m);
  endfunction

  // kind 0 band-pass (fa..fb), 1 band-stop (fa..fb), 2 high-pass (fa)
  task automatic make_coefs(int kind, int len, real fs, real fa, real fb, real atten,
                        output logic signed [COEF_W-1:0] c [NM]);
    real beta;
    int  pad;
    beta = (atten > 50.0) ? 0.1102 * (atten - 8.7)
                          : 0.5842 * $pow(atten - 21.0, 0.4) + 0.07886 * (atten - 21.0);
    pad = (NT - len) / 2;
    for (int k = 0; k < NM; k++) begin
      int  n, m;
      real w, hv, r;
      n = k - pad;
      if (n < 0) begin c[k] = '0; continue; end
      m = n - (len - 1) / 2;
      r = 2.0 * m / (len - 1);
      w = bessel_i0(beta * $sqrt(1.0 - r * r)) / bessel_i0(beta);
      case (kind)
        0: hv = lp(m, fb, fs) - lp(m, fa, fs);
        1: hv = ((m == 0) ? 1.0 : 0.0) - (lp(m, fb, fs) - lp(m, fa, fs));
        default: hv = ((m == 0) ? 1.0 : 0.0) - lp(m, fa, fs);
      endcase
      c[k] = 16'($rtoi(hv * w * 32768.0 + ((hv >= 0) ? 0.5 : -0.5)));
    end
  endtask

  // tone amplitude in volts-equivalent at the DAC, over frames j0 .. j0+WIN-1
  function automatic real tone_gain(int which, real f, real a_in, int j0);
    real i_sum = 0.0, q_sum = 0.0, mean = 0.0, y;
    for (int j = j0; j < j0 + WIN; j++)
      case (which)
        0: mean += h_bp.u_dac.dac_log[j];
        1: mean += h_bs.u_dac.dac_log[j];
        default: mean += h_hp.u_dac.dac_log[j];
      endcase
    mean = mean / WIN;
    for (int j = j0; j < j0 + WIN; j++) begin
      case (which)
        0: y = h_bp.u_dac.dac_log[j] - mean;
        1: y = h_bs.u_dac.dac_log[j] - mean;
        default: y = h_hp.u_dac.dac_log[j] - mean;
      endcase
      i_sum += y * $cos(2.0 * PI * f * j * 1.0e-6);
      q_sum += y * $sin(2.0 * PI * f * j * 1.0e-6);
    end
    return 2.0 * $sqrt(i_sum * i_sum + q_sum * q_sum) / WIN / (a_in * CODES_PER_V);
  endfunction

  function automatic real db(real g);
    return 20.0 * $log10((g > 1.0e-9) ? g : 1.0e-9);
  endfunction

  localparam real A = 0.5;   // volts per tone

  initial begin
    int frames;
    make_coefs(0, 57,  44100.0, 2000.0, 10000.0, 44.0, c_bp);
    make_coefs(1, 153, 44100.0, 3400.0, 4600.0,  47.0, c_bs);
    make_coefs(2, 157, 1.0e6,   5200.0, 0.0,     29.0, c_hp);
    frames = 4200 + WIN + 20;
    repeat (20) @(negedge clk);
    reset = 1'b0;
    for (int f = 0; f < frames; f++) begin
      real t;
      repeat (50) @(negedge clk);
      t = f * 1.0e-6;
      vin_bp = 2_048_000 + $rtoi(1.0e6 * A * ($sin(2*PI*500.0*t) + $sin(2*PI*6000.0*t) + $sin(2*PI*15000.0*t)));
      vin_bs = 2_048_000 + $rtoi(1.0e6 * A * ($sin(2*PI*1000.0*t) + $sin(2*PI*4000.0*t) + $sin(2*PI*8000.0*t)));
      vin_hp = 2_048_000 + $rtoi(1.0e6 * A * ($sin(2*PI*200.0*t) + $sin(2*PI*50000.0*t)));
      repeat (50) @(negedge clk);
    end
    finish = 1'b1;
    wait (dn[0] && dn[1] && dn[2]);
    for (int i = 0; i < 3; i++) begin
      checks += ck[i];
      failures += fl[i];
      $display("platform %0d: %0d exact frame checks, %0d failures", i, ck[i], fl[i]);
    end
    begin
      real g;
      int j0 = 4200;
      g = tone_gain(0, 6000.0, A, j0);  $display("  band-pass   6 kHz: %6.2f dB", db(g));  check(db(g) > -1.5 && db(g) < 1.5, "band-pass pass band");
      g = tone_gain(0, 500.0, A, j0);   $display("  band-pass 500 Hz: %6.2f dB", db(g));   check(db(g) < -30.0, "band-pass lower stop band");
      g = tone_gain(0, 15000.0, A, j0); $display("  band-pass  15 kHz: %6.2f dB", db(g)); check(db(g) < -30.0, "band-pass upper stop band");
      g = tone_gain(1, 1000.0, A, j0);  $display("  band-stop   1 kHz: %6.2f dB", db(g));  check(db(g) > -1.5 && db(g) < 1.5, "band-stop lower pass band");
      g = tone_gain(1, 8000.0, A, j0);  $display("  band-stop   8 kHz: %6.2f dB", db(g));  check(db(g) > -1.5 && db(g) < 1.5, "band-stop upper pass band");
      g = tone_gain(1, 4000.0, A, j0);  $display("  band-stop   4 kHz: %6.2f dB", db(g));  check(db(g) < -30.0, "band-stop notch");
      g = tone_gain(2, 50000.0, A, j0); $display("  high-pass  50 kHz: %6.2f dB", db(g)); check(db(g) > -1.5 && db(g) < 1.5, "high-pass pass band");
      g = tone_gain(2, 200.0, A, j0);   $display("  high-pass 200 Hz: %6.2f dB", db(g));   check(db(g) < -25.0, "high-pass stop band");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((4200 + WIN + 20) * 100 + 50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
