// tb_pipe_mult: self-checking test of the pipelined multiplier.
//
// Drives random signed operands (and the corner values -128, 127, 0) with a
// randomly gated enable, keeps the products computed by the simulator's own
// multiply in a history indexed by strobe, and checks that p equals the
// product of the operands captured LATENCY enabled edges earlier, counting
// the capturing edge (LATENCY register stages). Also
// checks that p holds while en is low and clears on reset.
module tb_pipe_mult;
  localparam int LAT = 7;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [7:0]  a = '0, b = '0;
  logic signed [15:0] p;
  int checks = 0, failures = 0;
  int hist [$];
  int cyc = 0;

  pipe_mult #(.AW(8), .PW(16), .LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic signed [15:0] held;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(p == 0, "reset clears");
    for (int n = 0; n < 3000; n++) begin
      #1;
      en = ($urandom_range(0, 3) != 0);
      case (n % 7)
        0: a = -8'sd128;
        1: a = 8'sd127;
        default: a = 8'($urandom);
      endcase
      case (n % 5)
        0: b = -8'sd128;
        1: b = 8'sd0;
        default: b = 8'($urandom);
      endcase
      held = p;
      @(posedge clk);
      if (en) hist.push_back(int'(a) * int'(b));
      #1;
      if (!en) check(p == held, "hold while en low");
      else if (hist.size() >= LAT) begin
        check(int'(p) == hist[hist.size() - LAT],
              $sformatf("n=%0d p=%0d exp=%0d", n, p, hist[hist.size() - LAT]));
      end else begin
        check(p == 0, "pipeline empty after reset");
      end
      #3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
