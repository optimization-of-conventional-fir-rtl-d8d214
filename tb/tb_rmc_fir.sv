// tb_rmc_fir: end-to-end self-checking testbench for the RMC FIR filter at
// its default sizes (12 taps, 8-bit samples, 8-bit coefficients, 18-bit
// output).
//
// Three runs, each after a reset:
//   1. a 12-tap Hamming-window low-pass set (1 kHz cut-off, 8 kHz sample
//      rate, scaled to a peak of 127) driven with a ramp 8, 9, 10, ...;
//   2. a unit impulse, which must return the coefficients h[0..11] in order
//      (b0..b5 then b5..b0);
//   3. random symmetric coefficients with random samples;
//   4. full-scale coefficients and mostly full-scale samples, which drive
//      results past the 18-bit range (the output keeps the low 18 bits).
// Every output is compared with a direct convolution over the samples the
// filter took. Also checked: one sample taken and one result produced every
// 3 clocks, the result of a sample appearing 3 clocks after it is taken, and
// the output holding its value between updates. The odd pass, even pass and
// output load are counted and each must occur.
module tb_rmc_fir;
  import rmc_pkg::*;

  localparam int TAPS   = 12;
  localparam int DATA_W = 8;
  localparam int COEF_W = 8;
  localparam int OUT_W  = 18;
  localparam int NMUL   = TAPS / 2;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x_in;
  logic signed [COEF_W-1:0] coef [NMUL];
  logic x_take, y_valid;
  logic signed [OUT_W-1:0] y_op;

  rmc_fir dut (.clk, .rst, .x_in, .coef, .x_take, .y_op, .y_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // Samples taken (newest first) and results still expected.
  int     hist [$];
  int     exp_q [$];
  longint take_cyc [$];
  longint last_take = -1, last_valid = -1;
  logic signed [OUT_W-1:0] last_y;
  bit     track = 0;

  int n_odd = 0, n_even = 0, n_out = 0, n_hold = 0, n_outputs = 0, n_wrap = 0;

  function automatic int h_of(int k);
    automatic int m = (k < NMUL) ? k : TAPS - 1 - k;
    return int'(coef[m]);
  endfunction

  function automatic int model_y();
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (k < hist.size()) s += longint'(h_of(k)) * hist[k];
    if (s >= (longint'(1) <<< (OUT_W-1)) || s < -(longint'(1) <<< (OUT_W-1))) n_wrap++;
    return int'(signed'(OUT_W'(s)));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      case (dut.u_fsm.state_q)
        ST_LOAD_ODD: n_odd++;
        ST_EVEN:     n_even++;
        ST_OUT:      n_out++;
        default:     ;
      endcase
    end
    if (!rst && track) begin
      if (x_take) begin
        if (last_take >= 0) check(cycle - last_take == 3, "sample spacing not 3 clocks");
        last_take = cycle;
        hist.push_front(int'(x_in));
        if (hist.size() > TAPS) void'(hist.pop_back());
        exp_q.push_back(model_y());
        take_cyc.push_back(cycle);
      end
      if (y_valid) begin
        int e;
        longint tc;
        n_outputs++;
        if (last_valid >= 0) check(cycle - last_valid == 3, "output spacing not 3 clocks");
        last_valid = cycle;
        if (exp_q.size() == 0) check(0, "unexpected output");
        else begin
          e  = exp_q.pop_front();
          tc = take_cyc.pop_front();
          check(y_op == OUT_W'(e), $sformatf("y_op=%0d expected %0d", y_op, e));
          // y_valid is high in the cycle after the load, 3 edges after the take.
          if (tc >= 0) check(cycle - tc == 4, $sformatf("latency %0d", cycle - tc - 1));
        end
      end else if (last_valid >= 0) begin
        check(y_op == last_y, "output changed between updates");
        n_hold++;
      end
      last_y = y_op;
    end
  end

  task automatic start_run();
    rst = 1'b1;
    track = 0;
    repeat (3) @(posedge clk);
    hist.delete(); exp_q.delete(); take_cyc.delete();
    last_take = -1; last_valid = -1;
    // First result after reset is the all-zero history.
    exp_q.push_back(0);
    take_cyc.push_back(-1);
    @(negedge clk);
    rst = 1'b0;
    track = 1;
  endtask

  task automatic drain();
    repeat (3 * TAPS + 6) @(negedge clk);
    check(exp_q.size() <= 2, "results missing");
  endtask

  initial begin
    real pi, wc, mid, hd, w, hmax;
    real hr [TAPS];
    int  v;
    pi = 3.14159265358979;
    x_in = '0;
    foreach (coef[k]) coef[k] = '0;
    rst = 1'b1;

    // 1. Hamming-window low-pass, ramp input.
    wc  = 2.0 * pi * 1000.0 / 8000.0;
    mid = (TAPS - 1) / 2.0;
    hmax = 0.0;
    for (int n = 0; n < TAPS; n++) begin
      hd = $sin(wc * (n - mid)) / (pi * (n - mid));
      w  = 0.54 - 0.46 * $cos(2.0 * pi * n / (TAPS - 1));
      hr[n] = hd * w;
      if (hr[n] > hmax) hmax = hr[n];
    end
    for (int k = 0; k < NMUL; k++) coef[k] = COEF_W'($rtoi(hr[k] / hmax * 127.0 + 0.5));
    start_run();
    v = 8;
    repeat (40) begin
      x_in = DATA_W'(v);
      @(negedge clk);
      if (x_take) v = (v == 127) ? 0 : v + 1;
    end
    drain();

    // 2. Impulse response.
    for (int k = 0; k < NMUL; k++) coef[k] = COEF_W'(10 * (k + 1) - 3);
    start_run();
    x_in = 8'sd1;
    while (!x_take) @(negedge clk);
    @(negedge clk);
    x_in = '0;
    repeat (3 * (TAPS + 4)) @(negedge clk);
    drain();

    // 3. Random symmetric coefficients and samples.
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < NMUL; k++) coef[k] = COEF_W'($urandom);
      start_run();
      repeat (300) begin
        x_in = DATA_W'($urandom);
        @(negedge clk);
      end
      drain();
    end

    // 4. Full-scale coefficients and samples: results beyond 18 bits.
    for (int k = 0; k < NMUL; k++) coef[k] = 8'sd127;
    start_run();
    repeat (3 * 2 * TAPS) begin
      x_in = ($urandom_range(3) == 0) ? DATA_W'($urandom) : -8'sd128;
      @(negedge clk);
    end
    drain();

    check(n_odd  > 0, "odd pass never happened");
    check(n_even > 0, "even pass never happened");
    check(n_out  > 0, "output load never happened");
    check(n_hold > 0, "output never held");
    check(n_wrap > 0, "no result beyond the 18-bit range was exercised");
    check(n_outputs > 400, "too few outputs");
    $display("mechanisms: odd_pass=%0d even_pass=%0d output_load=%0d hold_cycles=%0d outputs=%0d wraps=%0d",
             n_odd, n_even, n_out, n_hold, n_outputs, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
