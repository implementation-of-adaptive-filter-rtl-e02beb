// serial_fir: FIR filter computed serially with one multiplier and an
// accumulating adder, the output scaled by 1/TAPS.
//
// One term x(n-k) * c_k is added per clock while acc_en is 1; start clears
// the accumulator (and may coincide with the first term). After TAPS terms
// the accumulator holds sum_k x(n-k) c_k, and y is that sum multiplied by
// 1/TAPS, shifted to Q1.7 and saturated: the normalisation keeps the output
// away from saturation, as the document's serial reference design does.
//
// Formats: x Q1.7 times c Q2.14 gives Q3.21 terms; the accumulator has
// enough guard bits for TAPS terms; 1/TAPS is the constant round(2^15/TAPS)
// in Q0.15. These formats are this design's choice. The accumulator is a
// register; y is combinational from it.
module serial_fir
  import lms_pkg::*;
#(
  parameter int unsigned TAPS = 5
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  logic  acc_en,
  input  data_t x_k,
  input  coef_t c_k,
  output data_t y
);

  localparam int unsigned PW    = DW + CW;                    // Q3.21 term
  localparam int unsigned ACCW  = PW + $clog2(TAPS + 1);
  localparam int unsigned NFRAC = 15;
  localparam logic [NFRAC:0] NORM = (NFRAC+1)'(((1 << NFRAC) + TAPS / 2) / TAPS);
  // acc has 21 fraction bits, NORM 15, y 7
  localparam int unsigned Y_SHIFT = (DW - 1) + (CW - 2) + NFRAC - (DW - 1);

  logic signed [PW-1:0]         term;
  logic signed [ACCW-1:0]       acc;
  logic signed [ACCW+NFRAC+1:0] scaled;
  logic signed [ACCW+NFRAC+1:0] shifted;
  logic signed [ACCW+NFRAC+1:0] ymax, ymin;

  assign term = PW'(x_k) * PW'(c_k);

  always_ff @(posedge clk) begin
    if (rst)                  acc <= '0;
    else if (start && acc_en) acc <= ACCW'(term);
    else if (start)           acc <= '0;
    else if (acc_en)          acc <= acc + ACCW'(term);
  end

  // normalisation by 1/TAPS, then truncation to Q1.7 with saturation
  assign scaled  = (ACCW+NFRAC+2)'(acc) * $signed({1'b0, NORM});
  assign shifted = scaled >>> Y_SHIFT;
  assign ymax    = (ACCW+NFRAC+2)'(127);
  assign ymin    = -(ACCW+NFRAC+2)'(128);

  always_comb begin
    if (shifted > ymax)      y = 8'sd127;
    else if (shifted < ymin) y = -8'sd128;
    else                     y = shifted[DW-1:0];
  end

endmodule
