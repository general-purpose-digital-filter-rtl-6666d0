// tb_fir_symmetric -- checks the parallel symmetric FIR filter.
//
// Two instances: the default 171-tap filter (86 multipliers) and an 8-tap one
// (even length, no centre tap). Random coefficients and random input samples
// are applied with ce on every third clock. After each ce the output must
// equal the direct-form convolution sum_k h[k] x[n-k] over the full impulse
// response, rounded half up to the signal format and clipped, computed here
// without using the pairing. q_valid must pulse once per sample. A final
// impulse checks that the 171-tap filter returns its own coefficients in order.
module tb_fir_symmetric;
  import filter_pkg::*;

  localparam int NA = 171, MA = (NA + 1) / 2;
  localparam int NB = 8,   MB = (NB + 1) / 2;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  sig_t d = '0, qa, qb;
  logic va, vb;
  logic signed [COEF_W-1:0] ca [MA];
  logic signed [COEF_W-1:0] cb [MB];
  int checks = 0, failures = 0;
  longint xa [$];

  always #5 clk = ~clk;

  fir_symmetric #(.NTAPS(NA)) u_a (.clk, .rst_n, .ce, .d, .coef(ca), .q(qa), .q_valid(va));
  fir_symmetric #(.NTAPS(NB)) u_b (.clk, .rst_n, .ce, .d, .coef(cb), .q(qb), .q_valid(vb));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  function automatic longint clip(longint v);
    if (v > 524287) return 524287;
    if (v < -524288) return -524288;
    return v;
  endfunction

  function automatic longint ref_out(int n, bit which);
    longint acc = 0;
    int ntaps = which ? NB : NA;
    for (int k = 0; k < ntaps; k++) begin
      longint hk;
      int m;
      m = (k < (ntaps + 1) / 2) ? k : ntaps - 1 - k;
      hk = which ? longint'(cb[m]) : longint'(ca[m]);
      if (n - k >= 0) acc += hk * xa[n - k];
    end
    return clip((acc + 16384) >>> 15);
  endfunction

  task automatic step(longint x);
    d = sig_t'(x);
    xa.push_back(x);
    ce = 1'b1;
    @(posedge clk); #1;
    ce = 1'b0;
    check(va && vb, "q_valid after ce");
    check(longint'(qa) == ref_out(xa.size() - 1, 0),
          $sformatf("171-tap: sample %0d got %0d expected %0d", xa.size() - 1, qa, ref_out(xa.size() - 1, 0)));
    check(longint'(qb) == ref_out(xa.size() - 1, 1),
          $sformatf("8-tap: sample %0d got %0d expected %0d", xa.size() - 1, qb, ref_out(xa.size() - 1, 1)));
    @(posedge clk); #1;
    check(!va && !vb, "q_valid lasts one cycle");
    @(posedge clk); #1;
  endtask

  initial begin
    for (int k = 0; k < MA; k++) ca[k] = 16'(int'($urandom_range(0, 800)) - 400);
    for (int k = 0; k < MB; k++) cb[k] = 16'(int'($urandom_range(0, 16000)) - 8000);
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) step(longint'($urandom_range(0, 524287)) - 262144);
    // extreme inputs drive the small filter into saturation
    for (int k = 0; k < MB; k++) cb[k] = 16'sd32767;
    for (int i = 0; i < 20; i++) step((i % 2) ? 524287 : 400000);
    // impulse: 32768 * h[k] >> 15 = h[k]
    for (int i = 0; i < NA; i++) step(0);
    step(32768);
    check(longint'(qa) == longint'(ca[0]), "impulse response h[0]");
    for (int k = 1; k < NA; k++) begin
      step(0);
      check(longint'(qa) == longint'(ca[(k < MA) ? k : NA - 1 - k]), $sformatf("impulse response h[%0d]", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
