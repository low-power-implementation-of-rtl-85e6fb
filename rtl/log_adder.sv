// Log-domain adder: the multiplication step of the Mitchell multiplier.
//
// The two approximate logarithms k1 + x1 and k2 + x2 are added as single
// fixed-point words {k, x}. A carry out of the mantissa sum (x1 + x2 >= 1)
// increments the characteristic and leaves x1 + x2 - 1 as the mantissa,
// which is exactly Mitchell's second case 2^(k1+k2+1) * (x1 + x2); no extra
// logic is needed to separate the two cases. A plain ripple/carry adder is
// described here; the choice of adder architecture is left to synthesis.
//
// Interface: k1, k2 (log2 N bits), m1, m2 (N-1 bits) in; ksum (log2 N + 1
// bits) and msum (N-1 bits) out. Purely combinational.
module log_adder
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [L-1:0] k1,
  input  logic [N-2:0] m1,
  input  logic [L-1:0] k2,
  input  logic [N-2:0] m2,
  output logic [L:0]   ksum,
  output logic [N-2:0] msum
);

  logic [L+N-1:0] total;

  assign total = {1'b0, k1, m1} + {1'b0, k2, m2};
  assign ksum  = total[L+N-1:N-1];
  assign msum  = total[N-2:0];

endmodule
