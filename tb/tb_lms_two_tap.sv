// tb_lms_two_tap: the equalizer at two taps, the case the LMS equations
// Y(n) = W0 X(n) + W1 X(n-1), W_k(n) = W_k(n-1) + mu e(n) X(n-k) describe.
//
// Same method as tb_lms_equalizer: a random +-0.375 training sequence through
// the channel 0.75 + 0.31 z^-1 - 0.125 z^-2 (small noise), desired d(n) = s(n),
// and a sample-level delayed-LMS model checked against y_out, e_out and both
// coefficients after every clock edge. With two taps the adder tree is one
// level, so y(n) comes from register stage 9 (1 + 7 + 1), e(n) from stage 10,
// and the loop has 18 registers: w_k(n) = w_k(n-1) + mu e(n-17) x(n-17-k).
// Strobe gaps, an adaptation hold and output saturation are exercised, and
// the error power must drop by a factor of five (two taps cannot invert the
// channel as closely as five).
module tb_lms_two_tap;
  import lms_pkg::*;
  localparam int TAPS = 2, MU = 6, FILT = 9, ADAPT_DELAY = 17, NS = 8000, DDLY = 0;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, adapt_en = 1'b1;
  data_t x_in = '0, d_in = '0, y_out, e_out;
  logic  y_valid;
  coef_t coef [TAPS];
  int checks = 0, failures = 0;
  int xs [NS], ds [NS], ym [NS], em [NS];
  int wm [NS][TAPS];
  int stalls = 0, sat_y = 0, holds = 0;

  lms_equalizer #(.TAPS(TAPS), .MU_SHIFT(MU), .MULT_LAT(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v, input int w);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic int xat(input int n);
    return (n >= 0) ? xs[n] : 0;
  endfunction

  // model of strobe m: coefficients after the edge, then y(m) and e(m)
  // balanced tree as in the design: pairs (0,1), (2,3), ..., odd one passed on
  function automatic int tree_sum(input int p [TAPS]);
    int cur [TAPS];
    int n;
    cur = p;
    n = TAPS;
    while (n > 1) begin
      for (int i = 0; i < (n + 1) / 2; i++)
        cur[i] = (2 * i + 1 < n) ? clip(cur[2*i] + cur[2*i+1], 16) : cur[2*i];
      n = (n + 1) / 2;
    end
    return cur[0];
  endfunction

  task automatic model(input int m, input bit adapt);
    int p [TAPS];
    int s;
    for (int k = 0; k < TAPS; k++) begin
      int prev, inc;
      prev = (m > 0) ? wm[m-1][k] : 0;
      inc  = (m >= ADAPT_DELAY) ? ((em[m-ADAPT_DELAY] * xat(m - ADAPT_DELAY - k)) >>> MU) : 0;
      wm[m][k] = adapt ? clip(prev + inc, 16) : prev;
      p[k] = xat(m - k) * (wm[m][k] >>> 8);
    end
    s = tree_sum(p);
    ym[m] = clip(s >>> 6, 8);
    if (ym[m] != (s >>> 6)) sat_y++;
    em[m] = clip(ds[m] - ym[m], 8);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int sym [NS];
    int m, cyc;
    real mse_first, mse_last;
    for (int n = 0; n < NS; n++) sym[n] = ($urandom_range(0, 1) != 0) ? 48 : -48;
    for (int n = 0; n < NS; n++) begin
      int acc;
      acc = 96 * sym[n] + ((n > 0) ? 40 * sym[n-1] : 0) - ((n > 1) ? 16 * sym[n-2] : 0);
      xs[n] = clip((acc >>> 7) + int'($urandom_range(0, 4)) - 2, 8);
      ds[n] = (n >= DDLY) ? sym[n-DDLY] : 0;
      if (n >= NS - 300) xs[n] = ($urandom_range(0, 1) != 0) ? 127 : -128;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    m = 0; cyc = 0;
    while (m < NS) begin
      en = (cyc % 13 == 5 || cyc % 29 == 3) ? 1'b0 : 1'b1;
      adapt_en = !((m >= 3000 && m < 3500) || m >= NS - 300);
      x_in = 8'(xs[m]);
      d_in = 8'(ds[m]);
      @(posedge clk);
      if (en) begin
        model(m, adapt_en);
        if (!adapt_en) holds++;
        m++;
      end else stalls++;
      cyc++;
      #1;
      check(int'(y_out) == ((m - 1 >= FILT - 1) ? ym[m - FILT] : 0),
            $sformatf("m=%0d y=%0d exp %0d", m, y_out, ym[m - FILT]));
      check(int'(e_out) == ((m - 1 >= FILT) ? em[m - FILT - 1] : 0),
            $sformatf("m=%0d e=%0d exp %0d", m, e_out, em[m - FILT - 1]));
      check(y_valid == (m >= FILT), "y_valid");
      for (int k = 0; k < TAPS; k++)
        check(int'(coef[k]) == ((m > 0) ? wm[m-1][k] : 0),
              $sformatf("m=%0d w%0d=%0d exp %0d", m, k, coef[k], wm[m-1][k]));
    end
    mse_first = 0.0; mse_last = 0.0;
    for (int n = 0; n < 200; n++) mse_first += real'(em[n] * em[n]) / 200.0;
    for (int n = NS - 1300; n < NS - 300; n++) mse_last += real'(em[n] * em[n]) / 1000.0;
    $display("MSE first 200: %0.1f  last 1000: %0.1f (LSB^2)", mse_first, mse_last);
    for (int k = 0; k < TAPS; k++) $display("w%0d = %0d", k, wm[NS-1][k]);
    $display("stalls %0d  held strobes %0d  saturated y %0d", stalls, holds, sat_y);
    check(mse_last < mse_first / 5.0, "convergence");
    check(stalls > 0 && holds > 0 && sat_y > 0, "all mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
