// lms_pkg: word lengths and fixed-point helpers shared by the LMS equalizer.
//
// Data samples (x, d, y, e) are 8-bit two's complement Q1.7. Coefficients
// are 16-bit Q2.14, the same format as the 8x8 product x*e, so the weight
// update needs only the step-size shift before it is added. The 8-bit data
// and 16-bit coefficient widths follow the document; the Q formats are this
// design's choice. sat() clips a wide signed value to a narrower width
// instead of letting it wrap.
package lms_pkg;

  localparam int unsigned DW = 8;   // data word length
  localparam int unsigned CW = 16;  // coefficient / product word length

  typedef logic signed [DW-1:0] data_t;
  typedef logic signed [CW-1:0] coef_t;

  // Clip a 32-bit signed value to the signed range of 'width' bits.
  function automatic logic signed [31:0] sat(input logic signed [31:0] v,
                                             input int unsigned width);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (width - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (width - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
