// tb_delay_line: self-checking test of the tapped delay line.
//
// Pushes random samples with a randomly gated enable and checks every tap
// against a history of accepted samples: taps[i] must equal the sample
// accepted i+1 strobes before the latest (zero before that many were taken).
module tb_delay_line;
  localparam int D = 16;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [7:0] din = '0;
  logic signed [7:0] taps [D];
  int checks = 0, failures = 0;
  int hist [$];

  delay_line #(.W(8), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      en  = ($urandom_range(0, 2) != 0);
      din = 8'($urandom);
      @(posedge clk);
      if (en) hist.push_back(int'(din));
      #1;
      for (int i = 0; i < D; i++) begin
        int exp;
        exp = (hist.size() > i) ? hist[hist.size() - 1 - i] : 0;
        checks++;
        if (int'(taps[i]) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tap %0d = %0d exp %0d", n, i, taps[i], exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
