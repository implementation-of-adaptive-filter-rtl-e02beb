// lms_equalizer_top: the adaptive LMS equalizer system.
//
// Two independent filters stand side by side:
//  - the main design, a five-tap fine-grained pipelined LMS (delayed LMS)
//    equalizer, lms_equalizer, taking one sample per strobe, whose error is
//    squared and shown on four 7-segment digits by mse_display;
//  - the serial reference LMS filter, serial_lms, one multiplier-accumulator
//    and a sequenced coefficient update, taking one sample per 2*TAPS + 2
//    clocks through a valid/ready handshake (ports prefixed s_).
// In a receiver x_in is the channel output and d_in the known training
// sequence; both come from outside this design. Timing of each part is
// described in its own module.
module lms_equalizer_top
  import lms_pkg::*;
#(
  parameter int unsigned TAPS      = 5,
  parameter int unsigned MU_SHIFT  = 6,
  parameter int unsigned MULT_LAT  = 7,
  parameter int unsigned SCAN_BITS = 16
) (
  input  logic       clk,
  input  logic       rst,
  // pipelined equalizer
  input  logic       en,
  input  logic       adapt_en,
  input  data_t      x_in,
  input  data_t      d_in,
  output data_t      y_out,
  output data_t      e_out,
  output logic       y_valid,
  output coef_t      coef [TAPS],
  // squared-error display
  output logic [15:0] sq,
  output logic [6:0] seg,
  output logic [3:0] an,
  // serial reference filter
  input  logic       s_in_valid,
  output logic       s_in_ready,
  input  data_t      s_x_in,
  input  data_t      s_d_in,
  input  logic [7:0] s_step,
  output logic       s_out_valid,
  output data_t      s_y_out,
  output data_t      s_e_out,
  output coef_t      s_coef [TAPS]
);

  lms_equalizer #(.TAPS(TAPS), .MU_SHIFT(MU_SHIFT), .MULT_LAT(MULT_LAT)) u_eq (
    .clk(clk), .rst(rst), .en(en), .adapt_en(adapt_en),
    .x_in(x_in), .d_in(d_in), .y_out(y_out), .e_out(e_out),
    .y_valid(y_valid), .coef(coef)
  );

  mse_display #(.SCAN_BITS(SCAN_BITS), .MULT_LAT(MULT_LAT)) u_disp (
    .clk(clk), .rst(rst), .en(en), .e_in(e_out), .sq(sq), .seg(seg), .an(an)
  );

  serial_lms #(.TAPS(TAPS)) u_serial (
    .clk(clk), .rst(rst), .in_valid(s_in_valid), .in_ready(s_in_ready),
    .x_in(s_x_in), .d_in(s_d_in), .step(s_step), .out_valid(s_out_valid),
    .y_out(s_y_out), .e_out(s_e_out), .coef(s_coef)
  );

endmodule
