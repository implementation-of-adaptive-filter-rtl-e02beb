// serial_lms: serial LMS adaptive filter (the reference structure built from
// one FIR multiplier-accumulator and a coefficient update loop).
//
// Per sample the controller runs three phases:
//  1. FIR: TAPS clocks, one term x(n-k) * c_k per clock into serial_fir,
//     giving y(n) = (1/TAPS) sum_k x(n-k) c_k.
//  2. ERR: one clock, e(n) = sat(d(n) - y(n)).
//  3. UPD: TAPS clocks, c_k <= sat(c_k + ((x(n-k) * e(n)) * step) >>> 8),
//     one coefficient per clock. The coefficient registers are the delay
//     that separates the current coefficients from the next set.
// The update uses the error of the current sample (plain LMS, no delay).
//
// Interface: a sample (x_in, d_in, step) is taken when in_valid and in_ready
// are both 1; in_ready is 1 only while idle. y_out and e_out are valid with
// the one-clock pulse out_valid, which rises at the (TAPS+1)th clock edge
// after the edge that takes the sample; the next sample can be taken
// 2*TAPS + 2 clocks after the previous one.
// step is unsigned Q0.8. The phase order follows the document's figures;
// the handshake, formats and sequencing are this design's choices.
module serial_lms
  import lms_pkg::*;
#(
  parameter int unsigned TAPS = 5
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  data_t      x_in,
  input  data_t      d_in,
  input  logic [7:0] step,
  output logic       out_valid,
  output data_t      y_out,
  output data_t      e_out,
  output coef_t      coef [TAPS]
);

  typedef enum logic [1:0] {S_IDLE, S_FIR, S_ERR, S_UPD} state_t;

  localparam int unsigned KW = (TAPS > 1) ? $clog2(TAPS) : 1;
  localparam logic [KW-1:0] KLAST = KW'(TAPS - 1);

  state_t          state;
  logic [KW-1:0]   k;
  data_t           xs [TAPS];   // x(n), x(n-1), ...
  data_t           d_r;
  logic [7:0]      step_r;
  data_t           y_fir;
  logic signed [CW-1:0]   xe;
  logic signed [CW+8:0]   xes;
  coef_t                  c_next;

  assign in_ready = (state == S_IDLE);

  serial_fir #(.TAPS(TAPS)) u_fir (
    .clk(clk), .rst(rst),
    .start(state == S_FIR && k == '0), .acc_en(state == S_FIR),
    .x_k(xs[k]), .c_k(coef[k]), .y(y_fir)
  );

  // update term: x * e (Q2.14), times step (Q0.8), back to Q2.14
  assign xe     = CW'(xs[k]) * CW'(e_out);
  assign xes    = (CW+9)'(xe) * $signed({1'b0, step_r});
  assign c_next = CW'(sat(32'(coef[k]) + 32'(xes >>> 8), CW));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      k         <= '0;
      d_r       <= '0;
      step_r    <= '0;
      y_out     <= '0;
      e_out     <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < TAPS; i++) begin
        xs[i]   <= '0;
        coef[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          xs[0] <= x_in;
          for (int i = 1; i < TAPS; i++) xs[i] <= xs[i-1];
          d_r    <= d_in;
          step_r <= step;
          k      <= '0;
          state  <= S_FIR;
        end
        S_FIR: begin
          if (k == KLAST) begin
            k     <= '0;
            state <= S_ERR;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_ERR: begin
          y_out     <= y_fir;
          e_out     <= DW'(sat(32'(d_r) - 32'(y_fir), DW));
          out_valid <= 1'b1;
          state     <= S_UPD;
        end
        S_UPD: begin
          coef[k] <= c_next;
          if (k == KLAST) begin
            k     <= '0;
            state <= S_IDLE;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
