// tb_serial_fir: checks the serial multiply-accumulate FIR.
//
// Runs random five-term dot products (coefficients random or near full
// scale, to reach output saturation), one term per clock with start on the
// first, and compares y after the last term with the integer result
// sat8((sum x_k c_k) * round(2^15/5) >>> 29). Pauses in acc_en between terms
// must not change the result. Both saturation directions must be reached.
module tb_serial_fir;
  import lms_pkg::*;
  localparam int TAPS = 5;
  localparam int NORM = (32768 + TAPS / 2) / TAPS;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, acc_en = 1'b0;
  data_t x_k = '0;
  coef_t c_k = '0;
  data_t y;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  serial_fir #(.TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum, scaled;
    int exp;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      sum = 0;
      for (int k = 0; k < TAPS; k++) begin
        if ($urandom_range(0, 3) == 0) begin
          acc_en = 1'b0; start = 1'b0;
          @(posedge clk); #1;
        end
        start = (k == 0);
        acc_en = 1'b1;
        x_k = 8'($urandom);
        c_k = (t % 5 == 0) ? ((x_k[7]) ? -16'sd32768 : 16'sd32767)
            : (t % 5 == 1) ? ((x_k[7]) ? 16'sd32767 : -16'sd32768) : 16'($urandom);
        sum += longint'(x_k) * longint'(c_k);
        @(posedge clk); #1;
      end
      acc_en = 1'b0; start = 1'b0;
      scaled = (sum * longint'(NORM)) >>> 29;
      exp = (scaled > 127) ? 127 : (scaled < -128) ? -128 : int'(scaled);
      if (scaled > 127) sat_hi++;
      if (scaled < -128) sat_lo++;
      checks++;
      if (int'(y) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d y %0d exp %0d", t, y, exp);
      end
    end
    $display("saturation high %0d low %0d", sat_hi, sat_lo);
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
