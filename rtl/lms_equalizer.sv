// lms_equalizer: five-tap direct-form fine-grained pipelined LMS equalizer.
//
// The filter computes y(n) = sum_k w_k x(n-k) and e(n) = d(n) - y(n), and each
// coefficient follows the LMS rule w_k += mu * e * x(n-k) with mu = 2^-6.
// Every multiplier and adder is registered (fine-grained pipelining), so one
// sample is taken per strobe; the price is that the error reaching the
// update is older than the current sample: this is the delayed LMS (DLMS)
// algorithm. The x delay line is made long enough to hand each tap the
// sample that belongs to that delayed error, so the update stays correct
// apart from the delay.
//
// Datapath (default parameters, MULT_LAT = 7, TAPS = 5):
//   x_in -> x line (1) -> tap multipliers (7) -> adder tree (3) -> y_out
//   y_out and d delayed 11 -> error subtractor (1) -> e_out
//   e_out, x(n-k) -> update multiplier (7) -> >>>6 -> coefficient add (1)
// counting the edge that takes x(n) as stage 1, y(n) is the output of stage
// 11 (10 enabled edges later), e(n) of stage 12, and the update from sample
// n is in the coefficients from the edge of sample n+19 on:
//   w_k(n) = w_k(n-1) + mu e(n-19) x(n-19-k).
// y_out is the Q3.13 tree sum shifted to Q1.7 and saturated to 8 bits.
//
// The five taps, 8-bit data, 16-bit coefficients, the 6-bit shift for mu,
// the multiplier latency and the saturation follow the document. The
// balanced adder tree, the Q formats, the sample strobe en, the adapt_en
// hold and the reset are this design's choices.
module lms_equalizer
  import lms_pkg::*;
#(
  parameter int unsigned TAPS     = 5,
  parameter int unsigned MU_SHIFT = 6,
  parameter int unsigned MULT_LAT = 7
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  adapt_en,
  input  data_t x_in,
  input  data_t d_in,
  output data_t y_out,
  output data_t e_out,
  output logic  y_valid,
  output coef_t coef [TAPS]
);

  localparam int unsigned TREE_LAT = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam int unsigned FILT_LAT = 1 + MULT_LAT + TREE_LAT;  // x_in to y_out
  localparam int unsigned XDEPTH   = FILT_LAT + TAPS;
  // product x(Q1.7) * trunc(w)(Q2.6) has 13 fraction bits; y is Q1.7
  localparam int unsigned Y_SHIFT  = (DW - 1) + (DW - 2) - (DW - 1);

  data_t xd [XDEPTH];
  data_t dd [FILT_LAT];
  coef_t prod [TAPS];
  coef_t sum;

  delay_line #(.W(DW), .DEPTH(XDEPTH)) u_xline (
    .clk(clk), .rst(rst), .en(en), .din(x_in), .taps(xd)
  );

  delay_line #(.W(DW), .DEPTH(FILT_LAT)) u_dline (
    .clk(clk), .rst(rst), .en(en), .din(d_in), .taps(dd)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    lms_tap #(.MU_SHIFT(MU_SHIFT), .MULT_LAT(MULT_LAT)) u_tap (
      .clk(clk), .rst(rst), .en(en), .adapt_en(adapt_en),
      .x_f(xd[k]), .x_u(xd[FILT_LAT + k]), .e(e_out),
      .prod(prod[k]), .w(coef[k])
    );
  end

  adder_tree #(.N(TAPS), .W(CW)) u_tree (
    .clk(clk), .rst(rst), .en(en), .din(prod), .sum(sum)
  );

  // output truncation to Q1.7 with saturation
  assign y_out = DW'(sat(32'(sum >>> Y_SHIFT), DW));

  reg_adder #(.W(DW), .SUB(1'b1)) u_err (
    .clk(clk), .rst(rst), .en(en), .a(dd[FILT_LAT-1]), .b(y_out), .s(e_out)
  );

  lms_control #(.FILL(FILT_LAT)) u_ctrl (
    .clk(clk), .rst(rst), .en(en), .y_valid(y_valid)
  );

endmodule
