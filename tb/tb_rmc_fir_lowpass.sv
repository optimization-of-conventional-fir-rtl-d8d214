// tb_rmc_fir_lowpass: runs the filter, at its default sizes, as the 12-tap
// Hamming-window low-pass it is meant for, and checks its frequency
// response.
//
// The testbench designs the coefficient set itself: an ideal low-pass with a
// 1 kHz cut-off, at a sample rate of 8 kHz (its own assumption), times a
// 12-point Hamming window, scaled so the largest coefficient is 127. Three
// input signals with amplitude 100 are applied, each after a reset: a
// constant (DC), a 250 Hz sine (pass band) and a 3 kHz sine (stop band).
// Every output is compared exactly with a direct convolution. Once the
// 12-sample window is full, the amplitude of the output at the input
// frequency is measured over a whole number of periods (a single-bin DFT).
// It must match 100 * |H(f)|, worked out from the integer coefficients, to
// within the error that rounding the input sine can cause. The pass-band
// gain must exceed the stop-band gain.
module tb_rmc_fir_lowpass;
  localparam int TAPS   = 12;
  localparam int NMUL   = TAPS / 2;
  localparam real PI    = 3.14159265358979;
  localparam real FS    = 8000.0;
  localparam real AMP   = 100.0;
  localparam int  NMEAS = 64;

  logic clk = 1'b0;
  logic rst;
  logic signed [7:0]  x_in;
  logic signed [7:0]  coef [NMUL];
  logic x_take, y_valid;
  logic signed [17:0] y_op;

  rmc_fir dut (.clk, .rst, .x_in, .coef, .x_take, .y_op, .y_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int h [TAPS];
  int hist [$];
  int exp_q [$];
  real ys [$];

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Sample take and output check, as in the end-to-end testbench.
  always @(posedge clk) begin
    if (!rst) begin
      if (x_take) begin
        automatic longint s = 0;
        hist.push_front(int'(x_in));
        if (hist.size() > TAPS) void'(hist.pop_back());
        for (int k = 0; k < hist.size(); k++) s += longint'(h[k]) * hist[k];
        exp_q.push_back(int'(s));
      end
      if (y_valid) begin
        if (exp_q.size() == 0) chk(0, "unexpected output");
        else begin
          automatic int e = exp_q.pop_front();
          chk(int'(y_op) == e, $sformatf("y_op=%0d expected %0d", y_op, e));
          ys.push_back(real'(y_op));
        end
      end
    end
  end

  // |H(f)| of the integer coefficient set.
  function automatic real gain_at(real f);
    real re = 0.0, im = 0.0, w;
    w = 2.0 * PI * f / FS;
    for (int k = 0; k < TAPS; k++) begin
      re += h[k] * $cos(w * k);
      im -= h[k] * $sin(w * k);
    end
    return $sqrt(re * re + im * im);
  endfunction

  // Apply AMP*cos(2 pi f n / FS) (f = 0: constant AMP) and return the
  // measured output amplitude at f.
  task automatic run_tone(input real f, output real amp);
    real re, im, w;
    int  n, start;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    hist.delete(); exp_q.delete(); ys.delete();
    exp_q.push_back(0);               // all-zero history after reset
    rst = 1'b0;
    n = 0;
    w = 2.0 * PI * f / FS;
    while (ys.size() < 1 + TAPS + NMEAS + 2) begin
      x_in = 8'($rtoi(AMP * $cos(w * n) + ((AMP * $cos(w * n) >= 0.0) ? 0.5 : -0.5)));
      @(negedge clk);
      if (x_take) n++;
    end
    // ys[0] is the empty-history result; ys[j] answers sample j-1. Skip
    // until the window is full, then measure NMEAS outputs.
    start = 1 + TAPS;
    re = 0.0; im = 0.0;
    for (int j = 0; j < NMEAS; j++) begin
      re += ys[start + j] * $cos(w * (start - 1 + j));
      im -= ys[start + j] * $sin(w * (start - 1 + j));
    end
    if (f == 0.0) amp = re / NMEAS;
    else          amp = 2.0 * $sqrt(re * re + im * im) / NMEAS;
  endtask

  initial begin
    real hr [TAPS];
    real hd, wn, hmax, wc, mid, sum_abs;
    real a_dc, a_pass, a_stop, g_pass, g_stop, g_dc, tol;
    rst = 1'b1;
    x_in = '0;
    wc = 2.0 * PI * 1000.0 / FS;
    mid = (TAPS - 1) / 2.0;
    hmax = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      hd = $sin(wc * (n - mid)) / (PI * (n - mid));
      wn = 0.54 - 0.46 * $cos(2.0 * PI * n / (TAPS - 1));
      hr[n] = hd * wn;
      if (hr[n] > hmax) hmax = hr[n];
    end
    sum_abs = 0.0;
    for (int k = 0; k < NMUL; k++) begin
      coef[k] = 8'($rtoi(hr[k] / hmax * 127.0 + 0.5));
      h[k] = int'(coef[k]);
      h[TAPS - 1 - k] = int'(coef[k]);
    end
    foreach (h[k]) sum_abs += (h[k] < 0) ? -h[k] : h[k];
    $display("coefficients b0..b5: %0d %0d %0d %0d %0d %0d",
             coef[0], coef[1], coef[2], coef[3], coef[4], coef[5]);

    g_dc   = gain_at(0.0);
    g_pass = gain_at(250.0);
    g_stop = gain_at(3000.0);
    // Rounding the input moves each sample by at most 0.5.
    tol = 0.5 * sum_abs + 1.0;

    run_tone(0.0, a_dc);
    run_tone(250.0, a_pass);
    run_tone(3000.0, a_stop);
    $display("output amplitude: DC %0.1f (expected %0.1f), 250 Hz %0.1f (expected %0.1f), 3 kHz %0.1f (expected %0.1f)",
             a_dc, AMP * g_dc, a_pass, AMP * g_pass, a_stop, AMP * g_stop);
    chk(a_dc - AMP * g_dc < tol && AMP * g_dc - a_dc < tol, "DC gain");
    chk(a_pass - AMP * g_pass < tol && AMP * g_pass - a_pass < tol, "pass-band gain");
    chk(a_stop - AMP * g_stop < tol && AMP * g_stop - a_stop < tol, "stop-band gain");
    chk(a_pass > 4.0 * a_stop, "pass band not well above stop band");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
