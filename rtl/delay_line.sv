// delay_line: tapped shift register of samples (the z^-1 chain of the filter).
//
// Each enabled clock edge shifts din into taps[0] and every taps[i] into
// taps[i+1], so after an enabled edge taps[i] holds the sample taken i
// enabled edges before it (taps[0] the one taken by that edge). The
// equalizer uses one line for x, long enough to feed both the filter
// products (x(n-k)) and the weight update (x aligned with the delayed error),
// and one line to align the desired signal d with the filter output.
//
// Interface: din sampled on an enabled edge; synchronous reset clears all taps.
module delay_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) taps[i] <= '0;
    end else if (en) begin
      taps[0] <= din;
      for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
    end
  end

endmodule
