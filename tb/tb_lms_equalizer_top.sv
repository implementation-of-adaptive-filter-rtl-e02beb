// tb_lms_equalizer_top: end-to-end test of the whole system at its default
// parameters (five taps, 7-cycle multipliers, 16-bit display scan counter).
//
// Pipelined equalizer: a random +-0.375 training sequence passes through a
// three-tap channel model (0.75, 0.31, -0.125, small noise); d(n) = s(n-2).
// A sample-level delayed-LMS model (adaptation delay 19 strobes, from the
// component latencies) predicts y_out, e_out and the coefficients after
// every clock edge. Strobes are withheld now and then, adaptation is held
// for a stretch, and the input is overdriven at the end to saturate y.
// Display: sq must equal the square of the error seen 7 strobes before each
// return of the scan to digit 0, an must step one-hot through four digits,
// and seg must show the selected nibble.
// Serial filter: identifies d = 0.2 x(n) + 0.1 x(n-1) - 0.05 x(n-2) from
// random x through its valid/ready handshake; its error power must fall.
// Each mechanism (stall, hold, saturation, digit scan, handshake wait,
// convergence of both filters) is counted and must occur at least once.
module tb_lms_equalizer_top;
  import lms_pkg::*;
  localparam int TAPS = 5, MU = 6, FILT = 11, ADAPT_DELAY = 19, LAT = 7;
  localparam int SB = 16, NS = 140000;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, adapt_en = 1'b1;
  data_t x_in = '0, d_in = '0, y_out, e_out;
  logic  y_valid;
  coef_t coef [TAPS];
  logic [15:0] sq;
  logic [6:0] seg;
  logic [3:0] an;
  logic s_in_valid = 1'b0, s_in_ready, s_out_valid;
  data_t s_x_in = '0, s_d_in = '0, s_y_out, s_e_out;
  logic [7:0] s_step = 8'd64;
  coef_t s_coef [TAPS];

  int checks = 0, failures = 0;
  int xs [NS], ds [NS], ym [NS], em [NS];
  int wm [NS][TAPS];
  int stalls = 0, sat_y = 0, holds = 0, s_waits = 0, s_results = 0;
  int visits [4];
  real s_first = 0.0, s_last = 0.0;
  localparam logic [6:0] PAT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  lms_equalizer_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
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

  task automatic model(input int m, input bit adapt);
    int p [TAPS];
    int s01, s23, s;
    for (int k = 0; k < TAPS; k++) begin
      int prev, inc;
      prev = (m > 0) ? wm[m-1][k] : 0;
      inc  = (m >= ADAPT_DELAY) ? ((em[m-ADAPT_DELAY] * xat(m - ADAPT_DELAY - k)) >>> MU) : 0;
      wm[m][k] = adapt ? clip(prev + inc, 16) : prev;
      p[k] = xat(m - k) * (wm[m][k] >>> 8);
    end
    s01 = clip(p[0] + p[1], 16);
    s23 = clip(p[2] + p[3], 16);
    s   = clip(clip(s01 + s23, 16) + p[4], 16);
    ym[m] = clip(s >>> 6, 8);
    if (ym[m] != (s >>> 6)) sat_y++;
    em[m] = clip(ds[m] - ym[m], 8);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  // ---------------- pipelined equalizer and display ----------------
  initial begin : eq_side
    int sym [NS];
    int m, cyc, digit, expsq, esq_now, clkn, e_before;
    int eh [$];
    real mse_first, mse_last;
    for (int n = 0; n < NS; n++) sym[n] = ($urandom_range(0, 1) != 0) ? 48 : -48;
    for (int n = 0; n < NS; n++) begin
      int acc;
      acc = 96 * sym[n] + ((n > 0) ? 40 * sym[n-1] : 0) - ((n > 1) ? 16 * sym[n-2] : 0);
      xs[n] = clip((acc >>> 7) + int'($urandom_range(0, 4)) - 2, 8);
      ds[n] = (n > 1) ? sym[n-2] : 0;
      if (n >= NS - 300) xs[n] = ($urandom_range(0, 1) != 0) ? 127 : -128;
    end
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    m = 0; cyc = 0; clkn = 0; expsq = 0;
    while (m < NS) begin
      en = (cyc % 13 == 5 || cyc % 29 == 3) ? 1'b0 : 1'b1;
      adapt_en = !((m >= 3000 && m < 3500) || m >= NS - 300);
      x_in = 8'(xs[m]);
      d_in = 8'(ds[m]);
      // square at the display multiplier output before this edge
      esq_now = (eh.size() >= LAT) ? eh[eh.size() - LAT] * eh[eh.size() - LAT] : 0;
      e_before = int'(e_out);        // e_out as the display samples it at this edge
      @(posedge clk);
      if (en) begin
        eh.push_back(e_before);
        model(m, adapt_en);
        if (!adapt_en) holds++;
        m++;
      end else stalls++;
      if (clkn % (1 << SB) == 0) expsq = esq_now;
      clkn++;
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
      digit = (clkn % (1 << SB)) >> (SB - 2);
      visits[digit]++;
      check(int'(sq) == expsq, $sformatf("sq %0d exp %0d", sq, expsq));
      check(an == 4'(1 << digit), "digit enable");
      check(seg == PAT[(expsq >> (4 * digit)) & 15], "segments");
    end
    mse_first = 0.0; mse_last = 0.0;
    for (int n = 0; n < 200; n++) mse_first += real'(em[n] * em[n]) / 200.0;
    for (int n = NS - 5300; n < NS - 300; n++) mse_last += real'(em[n] * em[n]) / 5000.0;
    $display("equalizer MSE first 200: %0.1f  last 5000: %0.1f (LSB^2)", mse_first, mse_last);
    $display("equalizer w = %0d %0d %0d %0d %0d", wm[NS-1][0], wm[NS-1][1], wm[NS-1][2], wm[NS-1][3], wm[NS-1][4]);
    $display("stalls %0d  held strobes %0d  saturated y %0d  digit visits %0d %0d %0d %0d",
             stalls, holds, sat_y, visits[0], visits[1], visits[2], visits[3]);
    $display("serial: results %0d  waits %0d  error power first 50 %0.2f last 200 %0.2f",
             s_results, s_waits, s_first, s_last);
    check(mse_last < mse_first / 10.0, "equalizer converges");
    check(stalls > 0, "stall seen");
    check(holds > 0, "adaptation hold seen");
    check(sat_y > 0, "output saturation seen");
    check(visits[0] > 0 && visits[1] > 0 && visits[2] > 0 && visits[3] > 0, "all digits scanned");
    check(s_results >= 1000 && s_waits > 0, "serial handshake exercised");
    check(s_last < s_first / 10.0, "serial filter converges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- serial reference filter ----------------
  initial begin : serial_side
    int x0, x1, x2;
    x0 = 0; x1 = 0; x2 = 0;
    @(negedge rst);
    for (int n = 0; n < 1200; n++) begin
      x2 = x1; x1 = x0; x0 = int'($urandom_range(0, 200)) - 100;
      #1;
      s_in_valid = 1'b1;
      s_x_in = 8'(x0);
      s_d_in = 8'((51 * x0 + 26 * x1 - 13 * x2) >>> 8);
      while (!s_in_ready) begin s_waits++; @(posedge clk); #1; end
      @(posedge clk);
      #1 s_in_valid = 1'b0;
      while (!s_out_valid) begin @(posedge clk); #1; end
      s_results++;
      if (n < 50) s_first += real'(int'(s_e_out) * int'(s_e_out)) / 50.0;
      if (n >= 1000) s_last += real'(int'(s_e_out) * int'(s_e_out)) / 200.0;
    end
  end
endmodule
