// Binary to approximate-logarithm converter (one operand).
//
// Mitchell's approximation writes a = 2^k * (1 + x) with 0 <= x < 1 and
// takes log2(a) ~= k + x. The characteristic k is the position of the
// leading one (parallel LOD followed by the OR-tree encoder); the mantissa x
// is the operand shifted left by not(k), with the leading one dropped.
//
// Interface: a (N bits) in; k (log2 N bits) and mant (N-1 bits, x scaled by
// 2^(N-1)) out. For a == 0 the outputs are k = 0, mant = 0 and must be
// overridden by the zero detector. Purely combinational.
module log_converter
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [N-1:0] a,
  output logic [L-1:0] k,
  output logic [N-2:0] mant
);

  logic [N-1:0] onehot;

  lod #(.N(N)) u_lod (
    .z(a),
    .h(onehot)
  );

  or_tree_encoder #(.N(N)) u_enc (
    .h(onehot),
    .k(k)
  );

  norm_shifter #(.N(N)) u_shift (
    .a_low(a[N-2:0]),
    .k    (k),
    .mant(mant)
  );

endmodule
