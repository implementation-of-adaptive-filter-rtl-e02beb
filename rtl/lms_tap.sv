// lms_tap: one tap of the pipelined LMS equalizer.
//
// A tap holds one coefficient w_k and does two things each sample strobe:
//  - filter product: prod = x_f * trunc(w_k), where x_f = x(n-k) and
//    trunc() keeps the upper 8 bits of the 16-bit coefficient so that the
//    document's 8x8 multiplier can be used (truncation, Q2.6). prod is Q3.13.
//  - weight update: w_k <= sat(w_k + ((e * x_u) >>> MU_SHIFT)), the document's
//    LMS update W(n) = W(n-1) + mu*e*X with mu = 2^-MU_SHIFT realised as an
//    arithmetic shift right. x_u must be the x sample that produced e, which
//    the equalizer supplies from further down its delay line (delayed LMS).
//    The coefficient register is the registered saturating update adder.
// adapt_en = 0 holds the coefficient (a choice of this design, for running
// with frozen coefficients after training).
//
// Timing: prod is the output of register stage MULT_LAT counted from the
// edge that samples x_f and w_k; an e, x_u pair sampled at one edge changes
// w_k at the MULT_LAT-th enabled edge after it (stage MULT_LAT + 1).
module lms_tap
  import lms_pkg::*;
#(
  parameter int unsigned MU_SHIFT = 6,
  parameter int unsigned MULT_LAT = 7
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  adapt_en,
  input  data_t x_f,
  input  data_t x_u,
  input  data_t e,
  output coef_t prod,
  output coef_t w
);

  data_t w_trunc;
  coef_t upd_prod;
  coef_t incr;

  assign w_trunc = w[CW-1 -: DW];

  pipe_mult #(.AW(DW), .PW(CW), .LATENCY(MULT_LAT)) u_filt_mult (
    .clk(clk), .rst(rst), .en(en), .a(x_f), .b(w_trunc), .p(prod)
  );

  pipe_mult #(.AW(DW), .PW(CW), .LATENCY(MULT_LAT)) u_upd_mult (
    .clk(clk), .rst(rst), .en(en), .a(e), .b(x_u), .p(upd_prod)
  );

  // step-size scaling: arithmetic shift right by MU_SHIFT
  always_comb begin
    if (adapt_en) incr = upd_prod >>> MU_SHIFT;
    else          incr = '0;
  end

  reg_adder #(.W(CW)) u_coef (
    .clk(clk), .rst(rst), .en(en), .a(w), .b(incr), .s(w)
  );

endmodule
