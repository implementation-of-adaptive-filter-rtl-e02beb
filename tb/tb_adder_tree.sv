// tb_adder_tree: self-checking test of the registered saturating adder tree.
//
// Five random 16-bit inputs per strobe (some large enough to saturate). The
// expected sum is worked out level by level in the testbench, pairing
// (0,1), (2,3) and passing 4, each pair clipped to 16 bits, then checked
// against the output exactly 3 strobes later (ceil(log2 5)). Fails if no
// saturating case was seen.
module tb_adder_tree;
  localparam int N = 5, LAT = 3;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [15:0] din [N];
  logic signed [15:0] sum;
  int checks = 0, failures = 0, sats = 0;
  int hist [$];

  adder_tree #(.N(N), .W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  initial begin
    int v [N];
    int s01, s23, s0123, s;
    for (int i = 0; i < N; i++) din[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N; i++) begin
        din[i] = (n % 4 == 0) ? 16'($urandom) : 16'(int'($urandom_range(0, 8000)) - 4000);
        v[i] = int'(din[i]);
      end
      s01 = clip(v[0] + v[1]); s23 = clip(v[2] + v[3]);
      s0123 = clip(s01 + s23); s = clip(s0123 + v[4]);
      @(posedge clk);
      if (en) begin
        hist.push_back(s);
        if (s != v[0] + v[1] + v[2] + v[3] + v[4]) sats++;
      end
      #1;
      if (hist.size() >= LAT) begin
        checks++;
        if (int'(sum) != hist[hist.size() - LAT]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d sum %0d exp %0d", n, sum, hist[hist.size() - LAT]);
        end
      end
    end
    $display("saturating sums: %0d", sats);
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
