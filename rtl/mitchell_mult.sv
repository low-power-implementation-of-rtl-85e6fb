// Mitchell approximate logarithmic multiplier, N x N -> 2N bits, unsigned.
//
// The product a*b is computed in the logarithm domain:
//   1. each operand is converted to k + x (leading-one position plus
//      mantissa) by a parallel LOD, an OR-tree encoder and a shifter;
//   2. the two logarithms are added;
//   3. the sum is converted back (antilogarithm) by the Mitchell decoder;
//   4. a zero detector forces the product to zero when an operand is zero.
// The result always underestimates the exact product, by at most 1/9
// (11.1 %), and on average by about 3.8 % for uniformly random operands.
//
// Interface: a, b (N bits, unsigned) in; p (2N bits) out. N must be a power
// of two; the default of 32 bits is the headline configuration. The block is
// purely combinational, as in the reference design, which was evaluated
// with registers around it at 250 MHz. Handling signs (the CNN data are
// signed 10.22 fixed-point numbers) is left outside this unsigned core.
module mitchell_mult
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic [L-1:0]   ka, kb;
  logic [N-2:0]   ma, mb;
  logic [L:0]     ksum;
  logic [N-2:0]   msum;
  logic [2*N-1:0] p_log;
  logic           zero;

  log_converter #(.N(N)) u_conv_a (.a(a), .k(ka), .mant(ma));
  log_converter #(.N(N)) u_conv_b (.a(b), .k(kb), .mant(mb));

  log_adder #(.N(N)) u_add (
    .k1(ka), .m1(ma),
    .k2(kb), .m2(mb),
    .ksum(ksum), .msum(msum)
  );

  mitchell_decoder #(.N(N)) u_dec (
    .c(ksum),
    .f(msum),
    .p(p_log)
  );

  zero_detect #(.N(N)) u_zd (.a(a), .b(b), .zero(zero));

  assign p = zero ? '0 : p_log;

endmodule
