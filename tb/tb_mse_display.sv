// tb_mse_display: checks the squared-error display unit.
//
// With a short scan counter (SCAN_BITS = 6, 16 clocks per digit) the test
// feeds error samples, keeps its own record of e^2 per strobe (squares seen
// 7 strobes after the error), and checks that sq latches the current square
// whenever the scan returns to digit 0, that exactly one digit enable is
// active and steps through digits 0..3 in order, and that seg shows the
// selected nibble of sq (patterns from an independent table). Every digit
// position must be visited.
module tb_mse_display;
  import lms_pkg::*;
  localparam int SB = 6, LAT = 7;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  data_t e_in = '0;
  logic [15:0] sq;
  logic [6:0] seg;
  logic [3:0] an;
  int checks = 0, failures = 0;
  int visits [4];
  int sqh [$];
  localparam logic [6:0] PAT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};

  mse_display #(.SCAN_BITS(SB), .MULT_LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int clkn, expsq, digit, sq_now;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    clkn = 0; expsq = 0;
    for (int n = 0; n < 5000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      e_in = (n % 97 == 0) ? -8'sd128 : 8'($urandom);
      // square available at the multiplier output before this edge
      sq_now = (sqh.size() >= LAT) ? sqh[sqh.size() - LAT] : 0;
      @(posedge clk);
      if (en) sqh.push_back(int'(e_in) * int'(e_in));
      if (clkn % (1 << SB) == 0) expsq = sq_now;
      clkn++;
      #1;
      digit = (clkn % (1 << SB)) >> (SB - 2);
      visits[digit]++;
      check(int'(sq) == expsq, $sformatf("n=%0d sq %0d exp %0d", n, sq, expsq));
      check(an == 4'(1 << digit), $sformatf("an %b digit %0d", an, digit));
      check(seg == PAT[(expsq >> (4 * digit)) & 15], $sformatf("seg %b", seg));
    end
    check(visits[0] > 0 && visits[1] > 0 && visits[2] > 0 && visits[3] > 0, "all digits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
