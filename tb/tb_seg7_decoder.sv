// tb_seg7_decoder: checks all sixteen digits of the 7-segment decoder.
//
// The expected patterns are built independently, segment by segment, from
// the list of hex digits that light each segment (a..g), and compared with
// the decoder output {g,f,e,d,c,b,a} for every input value.
module tb_seg7_decoder;
  logic [3:0] bin;
  logic [6:0] seg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  // for each segment a..g, bit d set = lit for digit d (0..F)
  localparam logic [15:0] LIT [7] = '{
    16'b1101_0111_1110_1101,  // a: 0,2,3,5,6,7,8,9,A,C,E,F
    16'b0010_0111_1001_1111,  // b: 0,1,2,3,4,7,8,9,A,D
    16'b0010_1111_1111_1011,  // c: 0,1,3,4,5,6,7,8,9,A,B,D
    16'b0111_1011_0110_1101,  // d: 0,2,3,5,6,8,B,C,D,E
    16'b1111_1101_0100_0101,  // e: 0,2,6,8,A,B,C,D,E,F
    16'b1101_1111_0111_0001,  // f: 0,4,5,6,8,9,A,B,C,E,F
    16'b1110_1111_0111_1100   // g: 2,3,4,5,6,8,9,A,B,D,E,F
  };

  seg7_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [6:0] exp;
      bin = 4'(v);
      #1;
      for (int s = 0; s < 7; s++) exp[s] = LIT[s][v];
      checks++;
      if (seg !== exp) begin
        failures++;
        $display("FAIL digit %h: seg %b exp %b", v, seg, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
