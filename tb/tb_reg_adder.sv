// tb_reg_adder: self-checking test of the registered saturating adder.
//
// Two instances, a 16-bit adder and an 8-bit subtractor, get random operands
// plus operand pairs that overflow in both directions. After each enabled
// edge the outputs are compared with the clipped integer sum/difference; with
// en low the outputs must hold. Counts how often each saturation direction
// was exercised and fails if one never was.
module tb_reg_adder;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [15:0] a16 = '0, b16 = '0, s16;
  logic signed [7:0]  a8 = '0, b8 = '0, s8;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  reg_adder #(.W(16)) dut_add (.clk, .rst, .en, .a(a16), .b(b16), .s(s16));
  reg_adder #(.W(8), .SUB(1'b1)) dut_sub (.clk, .rst, .en, .a(a8), .b(b8), .s(s8));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v, input int w);
    int hi = (1 << (w - 1)) - 1;
    int lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int e16, e8, h16, h8;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(s16 == 0 && s8 == 0, "reset");
    for (int n = 0; n < 4000; n++) begin
      en = ($urandom_range(0, 4) != 0);
      if (n % 10 == 0)      begin a16 = 16'sd30000;  b16 = 16'sd10000;  a8 = 8'sd100;  b8 = -8'sd100; end
      else if (n % 10 == 1) begin a16 = -16'sd30000; b16 = -16'sd10000; a8 = -8'sd100; b8 = 8'sd100;  end
      else begin a16 = 16'($urandom); b16 = 16'($urandom); a8 = 8'($urandom); b8 = 8'($urandom); end
      e16 = clip(int'(a16) + int'(b16), 16);
      e8  = clip(int'(a8) - int'(b8), 8);
      h16 = int'(s16); h8 = int'(s8);
      if (en && e16 == 32767)  sat_hi++;
      if (en && e16 == -32768) sat_lo++;
      @(posedge clk); #1;
      if (en) begin
        check(int'(s16) == e16, $sformatf("add %0d+%0d=%0d exp %0d", a16, b16, s16, e16));
        check(int'(s8) == e8, $sformatf("sub %0d-%0d=%0d exp %0d", a8, b8, s8, e8));
      end else begin
        check(int'(s16) == h16 && int'(s8) == h8, "hold");
      end
    end
    $display("saturation high %0d low %0d", sat_hi, sat_lo);
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
