// sign_extend: widens a two's-complement vector by copying its sign bit.
//
// The equalizer uses two instances per tap: 8-bit coefficients and 16-bit
// samples are both brought to the 18-bit operand width of the hardware
// multipliers (the core's signExtend_8_18 and signExtend_16_18, here one
// module with the two widths as parameters). Purely combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 18
) (
  input  logic [IN_W-1:0]  in_vec,
  output logic [OUT_W-1:0] out_vec
);

  initial assert (OUT_W >= IN_W) else $error("sign_extend: OUT_W < IN_W");

  always_comb begin
    out_vec = {OUT_W{in_vec[IN_W-1]}};
    out_vec[IN_W-1:0] = in_vec;
  end

endmodule
