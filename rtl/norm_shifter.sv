// Normalising shifter of the logarithm converter.
//
// Shifts the operand left by n-1-k so that its leading one lands on the MSB;
// the N-1 bits below it are then the Mitchell mantissa x, with the operand
// equal to 2^k * (1 + x). For a power-of-two N the shift amount n-1-k is
// just the bitwise inverse of k, so no subtractor is needed.
//
// Interface: a_low (the N-1 low bits of the operand) and k (log2 N bits)
// in; mant (N-1 bits) out. The operand's MSB is not needed: it can only
// survive a shift of zero, and then it is the leading one that the mantissa
// drops.
// Purely combinational.
module norm_shifter
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [N-2:0] a_low,
  input  logic [L-1:0] k,
  output logic [N-2:0] mant
);

  logic [L-1:0] shamt;

  assign shamt = ~k;              // == N-1-k for N = 2^L
  assign mant  = a_low << shamt;

endmodule
