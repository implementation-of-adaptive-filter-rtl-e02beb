// lms_control: pipeline fill tracking for the equalizer.
//
// The equalizer accepts a sample on every strobe and has no stalls of its own,
// so its control reduces to knowing when the pipeline has filled after reset:
// a counter counts enabled strobes and raises y_valid once FILL strobes have
// passed, i.e. when y_out first carries the response to a sample offered
// after reset. It saturates there. (The document only names a control
// module; this reduced form is this design's choice.)
module lms_control #(
  parameter int unsigned FILL = 11
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic y_valid
);

  localparam int unsigned CNTW = $clog2(FILL + 1);

  logic [CNTW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)                            cnt <= '0;
    else if (en && cnt != CNTW'(FILL))  cnt <= cnt + 1'b1;
  end

  assign y_valid = (cnt == CNTW'(FILL));

endmodule
