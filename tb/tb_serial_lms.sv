// tb_serial_lms: checks the serial LMS filter against a sample-level model.
//
// System identification: d(n) = (0.2 x(n) + 0.1 x(n-1) - 0.05 x(n-2)) with
// random x. The testbench model computes, per sample,
//   y = sat8((sum_k x(n-k) c_k) * round(2^15/5) >>> 29),  e = sat8(d - y),
//   c_k = sat16(c_k + ((x(n-k) e) * step) >>> 8)
// and checks y_out, e_out and all coefficients at each out_valid / at the
// next accepted sample. It also checks the handshake timing: out_valid comes
// TAPS+2 clocks after acceptance and samples are accepted every 2*TAPS+2
// clocks at best. in_valid is sometimes withheld. The error power of the
// last 500 samples must be far below that of the first 50.
module tb_serial_lms;
  import lms_pkg::*;
  localparam int TAPS = 5, NS = 3000;
  localparam int NORM = (32768 + TAPS / 2) / TAPS;
  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic in_ready, out_valid;
  data_t x_in = '0, d_in = '0, y_out, e_out;
  logic [7:0] step = 8'd64;
  coef_t coef [TAPS];
  int checks = 0, failures = 0, idle = 0;
  int cm [TAPS];
  int xm [TAPS];
  int em [NS];

  serial_lms #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input longint v, input int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -(64'sd1 <<< (w - 1));
    return int'((v > hi) ? hi : (v < lo) ? lo : v);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int xh [NS];
    int t_acc, t_prev, lat;
    longint sum;
    int y, e;
    real p_first, p_last;
    for (int n = 0; n < NS; n++) xh[n] = int'($urandom_range(0, 200)) - 100;
    for (int k = 0; k < TAPS; k++) begin cm[k] = 0; xm[k] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    t_prev = -100;
    for (int n = 0; n < NS; n++) begin
      int dn;
      dn = (51 * xh[n] + ((n > 0) ? 26 * xh[n-1] : 0) - ((n > 1) ? 13 * xh[n-2] : 0)) >>> 8;
      // optionally withhold the sample for a few clocks
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        repeat ($urandom_range(1, 3)) begin @(posedge clk); idle++; end
        #1;
      end
      in_valid = 1'b1; x_in = 8'(xh[n]); d_in = 8'(dn);
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk);
      t_acc = int'($time / 10);
      if (t_prev >= 0) check(t_acc - t_prev >= 2 * TAPS + 2, "throughput");
      t_prev = t_acc;
      #1 in_valid = 1'b0;
      // model
      for (int k = TAPS - 1; k > 0; k--) xm[k] = xm[k-1];
      xm[0] = xh[n];
      sum = 0;
      for (int k = 0; k < TAPS; k++) sum += longint'(xm[k]) * longint'(cm[k]);
      y = clip((sum * longint'(NORM)) >>> 29, 8);
      e = clip(longint'(dn) - longint'(y), 8);
      em[n] = e;
      for (int k = 0; k < TAPS; k++)
        cm[k] = clip(longint'(cm[k]) + (((longint'(xm[k]) * e) * longint'(step)) >>> 8), 16);
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      check(lat == TAPS + 1, $sformatf("latency %0d", lat + 1));
      check(int'(y_out) == y && int'(e_out) == e,
            $sformatf("n=%0d y %0d/%0d e %0d/%0d", n, y_out, y, e_out, e));
      while (!in_ready) begin @(posedge clk); #1; end
      for (int k = 0; k < TAPS; k++)
        check(int'(coef[k]) == cm[k], $sformatf("n=%0d c%0d %0d exp %0d", n, k, coef[k], cm[k]));
    end
    p_first = 0.0; p_last = 0.0;
    for (int n = 0; n < 50; n++) p_first += real'(em[n] * em[n]) / 50.0;
    for (int n = NS - 500; n < NS; n++) p_last += real'(em[n] * em[n]) / 500.0;
    $display("error power first 50: %0.2f last 500: %0.2f; c = %0d %0d %0d %0d %0d",
             p_first, p_last, cm[0], cm[1], cm[2], cm[3], cm[4]);
    check(p_last < p_first / 10.0, "convergence");
    check(idle > 0, "withheld samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
