// equalizer: 8-tap delay-line (FIR) equalizer built on hardware multipliers.
//
// Each accepted sample is shifted into the tap line (tap 0 holds the newest
// sample, tap N_TAPS-1 the oldest). Every tap is then multiplied by its
// coefficient and the products are summed:
//
//     y = sum_{i=0}^{N_TAPS-1} coeff[i] * tap[i]
//
// coeff[i] is coeffs[8*i +: 8], so the first coefficient, coeffs[7:0], weights
// the newest sample. Coefficients and samples are sign-extended to the 18-bit
// multiplier operands (sign_extend), multiplied by one mult18x18 per tap, and
// the full 36-bit products are added. With 8-bit and 16-bit operands each
// product fits in 24 bits and the sum in 27, so the 32-bit result is exact.
//
// Timing (a small state machine, IDLE -> MULT -> SUM):
//   cycle 0  start=1 and busy=0: sample_in is shifted into the tap line
//   cycle 1  the multipliers settle; their products are registered
//   cycle 2  the products are summed into y_out; done is high for one cycle
// coeffs must be stable from cycle 0 to cycle 1. A start while busy is
// ignored. The tap line keeps its contents across frames and is cleared
// only by reset (an assumption: the data sheet does not say).
module equalizer
  import eq_pkg::*;
#(
  parameter int unsigned TAPS = N_TAPS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [SAMPLE_W-1:0]       sample_in,
  input  logic [TAPS*COEFF_W-1:0]   coeffs,
  output logic signed [OUT_W-1:0]   y_out,
  output logic                      done,
  output logic                      busy
);

  typedef enum logic [1:0] {EQ_IDLE, EQ_MULT, EQ_SUM} eq_state_e;
  eq_state_e state;

  logic [SAMPLE_W-1:0]      taps   [TAPS];
  logic signed [PROD_W-1:0] prod_c [TAPS];
  logic signed [PROD_W-1:0] prod_q [TAPS];
  logic signed [PROD_W+3:0] sum_c;

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    logic [MULT_W-1:0] c_ext, s_ext;
    sign_extend #(.IN_W(COEFF_W),  .OUT_W(MULT_W)) u_ext_c (
      .in_vec(coeffs[i*COEFF_W +: COEFF_W]), .out_vec(c_ext));
    sign_extend #(.IN_W(SAMPLE_W), .OUT_W(MULT_W)) u_ext_s (
      .in_vec(taps[i]), .out_vec(s_ext));
    mult18x18 u_mult (.a(signed'(c_ext)), .b(signed'(s_ext)), .p(prod_c[i]));
  end

  always_comb begin
    sum_c = '0;
    for (int i = 0; i < TAPS; i++) sum_c += (PROD_W+4)'(prod_q[i]);
  end

  assign busy = (state != EQ_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= EQ_IDLE;
      done  <= 1'b0;
      y_out <= '0;
      for (int i = 0; i < TAPS; i++) begin
        taps[i]   <= '0;
        prod_q[i] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        EQ_IDLE: if (start) begin
          taps[0] <= sample_in;
          for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
          state <= EQ_MULT;
        end
        EQ_MULT: begin
          for (int i = 0; i < TAPS; i++) prod_q[i] <= prod_c[i];
          state <= EQ_SUM;
        end
        EQ_SUM: begin
          y_out <= sum_c[OUT_W-1:0];
          done  <= 1'b1;
          state <= EQ_IDLE;
        end
        default: state <= EQ_IDLE;
      endcase
    end
  end

endmodule
