// Zero detection unit.
//
// Mitchell's logarithm has no value for zero: the converter would treat a
// zero operand as 2^0 = 1 and give a product of the other operand. For CNN
// inference, where many activations are exactly zero after ReLU, this error
// is harmful, so the multiplier forces its product to zero whenever either
// operand is zero. This block raises 'zero' in that case (a NOR over each
// operand, then an OR).
//
// Interface: a, b (N bits) in; zero out. Purely combinational.
module zero_detect
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         zero
);

  assign zero = ~(|a) | ~(|b);

endmodule
