// tb_lms_tap: self-checking test of one equalizer tap.
//
// Drives random x_f, x_u and e with a gated strobe and a toggling adapt_en,
// and keeps an independent model of the tap: the coefficient gains
// (e * x_u) >>> 6 seven strobes after the pair was offered, clipped to 16
// bits, when adapt_en is 1 at that strobe; the filter product is x_f times
// the upper 8 bits of the coefficient as it was when x_f was taken, seen
// seven strobes later. Phases of constant large e*x drive the coefficient
// into positive and negative saturation; each phase must be reached.
module tb_lms_tap;
  import lms_pkg::*;
  localparam int LAT = 7, MU = 6;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, adapt_en = 1'b0;
  data_t x_f = '0, x_u = '0, e = '0;
  coef_t prod, w;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0, held = 0;
  int pu [$];
  int pf [$];
  int wm = 0;

  lms_tap #(.MU_SHIFT(MU), .MULT_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int inc, m;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    m = 0;
    for (int n = 0; n < 12000; n++) begin
      en = ($urandom_range(0, 4) != 0);
      adapt_en = (n % 1000) < 900;
      x_f = 8'($urandom);
      if (n >= 3000 && n < 5000) begin e = 8'sd100; x_u = 8'sd120; end
      else if (n >= 5000 && n < 8000) begin e = -8'sd100; x_u = 8'sd120; end
      else begin e = 8'($urandom_range(0, 60) - 30); x_u = 8'($urandom); end
      @(posedge clk);
      if (en) begin
        pu.push_back(int'(e) * int'(x_u));
        pf.push_back(int'(x_f) * int'($signed(wm[15:8])));
        inc = (m >= LAT) ? (pu[m - LAT] >>> MU) : 0;
        if (adapt_en) wm = wm + inc;
        else if (inc != 0) held++;
        if (wm > 32767) begin wm = 32767; sat_hi++; end
        if (wm < -32768) begin wm = -32768; sat_lo++; end
        m++;
      end
      #1;
      check(int'(w) == wm, $sformatf("n=%0d w=%0d exp %0d", n, w, wm));
      if (m >= LAT) check(int'(prod) == pf[m - LAT], $sformatf("n=%0d prod=%0d exp %0d", n, prod, pf[m - LAT]));
    end
    $display("coefficient saturation high %0d low %0d, held updates %0d", sat_hi, sat_lo, held);
    if (sat_hi == 0 || sat_lo == 0 || held == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
