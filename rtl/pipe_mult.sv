// pipe_mult: signed AW x AW pipelined adder-tree multiplier, PW-bit product.
//
// The multiplier is built as the document describes it: an array of partial
// products followed by an adder tree, with pipeline registers at the partial
// product generator and after the tree's adders. Partial product i is a << i
// when bit i of b is set; the product of the sign bit of b carries negative
// weight (two's complement), so the sum is the exact signed product. With
// AW = 8 the tree has three levels (8 -> 4 -> 2 -> 1), each registered.
//
// The document states a latency of 7 for this multiplier. The partial product
// register and the three tree levels give 4 cycles; the remaining
// LATENCY - 4 registers are placed after the tree to balance the pipeline
// (where they sit is this design's choice). All registers advance when en
// is 1 and clear on the synchronous reset.
//
// Interface: a, b are sampled on an enabled clock edge; p = a*b is the output
// of register stage LATENCY, so it appears LATENCY - 1 enabled edges after
// that sampling edge. AW must be a power of two.
module pipe_mult #(
  parameter int unsigned AW      = 8,
  parameter int unsigned PW      = 2 * AW,
  parameter int unsigned LATENCY = 7
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [AW-1:0] a,
  input  logic signed [AW-1:0] b,
  output logic signed [PW-1:0] p
);

  localparam int unsigned LEVELS = $clog2(AW);
  localparam int unsigned EXTRA  = LATENCY - 1 - LEVELS;

  initial begin
    assert (LATENCY >= 1 + LEVELS)
      else $fatal(1, "pipe_mult: LATENCY must be at least %0d", 1 + LEVELS);
    assert (AW == (1 << LEVELS)) else $fatal(1, "pipe_mult: AW must be a power of two");
  end

  // tree[l][i]: node i at tree level l (level 0 = partial products)
  logic signed [PW-1:0] tree [LEVELS+1][AW];

  // Partial product generator, registered.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < AW; i++) tree[0][i] <= '0;
    end else if (en) begin
      for (int i = 0; i < AW; i++) begin
        logic signed [PW-1:0] shifted;
        shifted = PW'(a) <<< i;
        if (!b[i])              tree[0][i] <= '0;
        else if (i == AW - 1)   tree[0][i] <= -shifted;
        else                    tree[0][i] <= shifted;
      end
    end
  end

  // Adder tree, one register per level.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NODES = AW >> (l + 1);
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < AW; i++) tree[l+1][i] <= '0;
      end else if (en) begin
        for (int i = 0; i < AW; i++) begin
          if (i < NODES) tree[l+1][i] <= tree[l][2*i] + tree[l][2*i+1];
          else           tree[l+1][i] <= '0;
        end
      end
    end
  end

  // Balancing registers up to the stated latency.
  if (EXTRA == 0) begin : g_noextra
    assign p = tree[LEVELS][0];
  end else begin : g_extra
    logic signed [PW-1:0] dly [EXTRA];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < EXTRA; i++) dly[i] <= '0;
      end else if (en) begin
        dly[0] <= tree[LEVELS][0];
        for (int i = 1; i < EXTRA; i++) dly[i] <= dly[i-1];
      end
    end
    assign p = dly[EXTRA-1];
  end

endmodule
