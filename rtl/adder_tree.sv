// adder_tree: sums N signed W-bit values with registered saturating adders.
//
// This is the feed-forward sum of the direct-form filter. The document notes
// that in the direct form the output latency does not grow linearly with the
// filter order, so the sum is a balanced tree rather than a chain: each level
// adds neighbouring pairs (0+1, 2+3, ...) in reg_adder instances and passes an
// odd last value through a register, so all paths have the same latency,
// ceil(log2 N) strobes (3 for N = 5). Every adder saturates to W bits.
//
// Interface: din sampled on an enabled edge; sum is the output of register
// stage ceil(log2 N), i.e. ceil(log2 N) - 1 enabled edges after that edge.
module adder_tree #(
  parameter int unsigned N = 5,
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] din [N],
  output logic signed [W-1:0] sum
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  // Number of values at level l.
  function automatic int unsigned count(input int unsigned l);
    return (N + (1 << l) - 1) >> l;
  endfunction

  logic signed [W-1:0] lvl [LEVELS+1][N];

  for (genvar i = 0; i < N; i++) begin : g_in
    assign lvl[0][i] = din[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned NIN  = count(l);
    localparam int unsigned NOUT = count(l + 1);
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i < NOUT && 2 * i + 1 < NIN) begin : g_add
        reg_adder #(.W(W)) u_add (
          .clk(clk), .rst(rst), .en(en),
          .a(lvl[l][2*i]), .b(lvl[l][2*i+1]), .s(lvl[l+1][i])
        );
      end else if (i < NOUT) begin : g_pass
        // odd value out: delay it to keep the levels aligned
        always_ff @(posedge clk) begin
          if (rst)     lvl[l+1][i] <= '0;
          else if (en) lvl[l+1][i] <= lvl[l][2*i];
        end
      end else begin : g_unused
        assign lvl[l+1][i] = '0;
      end
    end
  end

  assign sum = lvl[LEVELS][0];

endmodule
