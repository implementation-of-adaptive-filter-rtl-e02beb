// mse_display: shows the squared error of the equalizer on four 7-segment digits.
//
// The document's display unit squares the error and drives 7-segment
// displays through a 4x1 multiplexer and a binary to 7-segment converter.
// Here the square e^2 (16 bits, Q2.14) is formed by the same pipelined 8x8
// multiplier the filter uses, one square per sample strobe. The four digits
// share one decoder: a free-running SCAN_BITS-bit counter selects, with its
// top two bits, which nibble of the square the 4x1 mux passes to the decoder
// and which digit enable in 'an' is raised (digit 0 = least significant
// nibble). The square is latched into 'sq' each time the scan returns to
// digit 0, so the four digits of one scan show one value.
//
// Timing: the square of an error sampled at one enabled edge is at the
// multiplier output MULT_LAT - 1 enabled edges later; each digit is lit for
// 2^(SCAN_BITS-2) clocks. The scan counter runs on every clock, the squarer
// on strobes. The scan rate, the latching and the active-high outputs are
// this design's choices.
module mse_display
  import lms_pkg::*;
#(
  parameter int unsigned SCAN_BITS = 16,
  parameter int unsigned MULT_LAT  = 7
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  data_t       e_in,
  output logic [15:0] sq,
  output logic [6:0]  seg,
  output logic [3:0]  an
);

  coef_t                sq_now;
  logic [SCAN_BITS-1:0] scan;
  logic [1:0]           digit;
  logic [3:0]           nibble;

  pipe_mult #(.AW(DW), .PW(CW), .LATENCY(MULT_LAT)) u_square (
    .clk(clk), .rst(rst), .en(en), .a(e_in), .b(e_in), .p(sq_now)
  );

  assign digit = scan[SCAN_BITS-1 -: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      scan <= '0;
      sq   <= '0;
    end else begin
      scan <= scan + 1'b1;
      if (scan == '0) sq <= sq_now;
    end
  end

  // 4x1 nibble multiplexer
  always_comb begin
    unique case (digit)
      2'd0: nibble = sq[3:0];
      2'd1: nibble = sq[7:4];
      2'd2: nibble = sq[11:8];
      2'd3: nibble = sq[15:12];
    endcase
  end

  assign an = 4'b0001 << digit;

  seg7_decoder u_dec (.bin(nibble), .seg(seg));

endmodule
