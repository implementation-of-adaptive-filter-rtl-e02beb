// reg_adder: two-input signed adder with saturation and a registered output.
//
// This is the document's basic adder: an 8-bit or 16-bit adder whose result
// is registered, so it adds one cycle of latency. The result is clipped to
// the W-bit signed range rather than wrapping, which is how this design
// realises the document's saturation circuit. With SUB = 1 the block
// computes a - b, which serves as the error adder e = d - y (reusing one
// module for both is this design's choice).
//
// Interface: a, b sampled on an enabled clock edge; s holds the result from
// that edge on. Synchronous active-high reset clears s.
module reg_adder #(
  parameter int unsigned W   = 16,
  parameter bit          SUB = 1'b0
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] s
);

  localparam logic signed [W:0] MAXV = (W+1)'((1 << (W - 1)) - 1);
  localparam logic signed [W:0] MINV = -(W+1)'(1 << (W - 1));

  logic signed [W:0] full;

  always_comb begin
    if (SUB) full = (W+1)'(a) - (W+1)'(b);
    else     full = (W+1)'(a) + (W+1)'(b);
  end

  always_ff @(posedge clk) begin
    if (rst)                s <= '0;
    else if (en) begin
      if (full > MAXV)      s <= MAXV[W-1:0];
      else if (full < MINV) s <= MINV[W-1:0];
      else                  s <= full[W-1:0];
    end
  end

endmodule
