// tb_lms_control: checks the pipeline fill flag.
//
// After reset y_valid must stay 0 for the first 10 enabled strobes, rise on
// the 11th and stay 1; strobes with en low must not count. Reset clears it.
module tb_lms_control;
  localparam int FILL = 11;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic y_valid;
  int checks = 0, failures = 0;

  lms_control #(.FILL(FILL)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt;
    for (int round = 0; round < 5; round++) begin
      rst = 1'b1; en = 1'b1;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      cnt = 0;
      checks++; if (y_valid) failures++;
      for (int n = 0; n < 60; n++) begin
        en = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        if (en) cnt++;
        #1;
        checks++;
        if (y_valid != (cnt >= FILL)) begin
          failures++;
          $display("FAIL round %0d cnt %0d y_valid %0b", round, cnt, y_valid);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
