// mult18x18: signed 18 x 18 -> 36-bit multiplier, the behaviour of one
// Virtex-II embedded multiplier block.
//
// It is combinational; the equalizer gives it one full clock cycle and
// registers the product, as the core's data sheet describes ("treated as
// asynchronous and take 1 clock cycle"). Operands and product are two's
// complement.
module mult18x18 (
  input  logic signed [17:0] a,
  input  logic signed [17:0] b,
  output logic signed [35:0] p
);

  always_comb p = a * b;

endmodule
