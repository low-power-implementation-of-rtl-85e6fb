// Mitchell decoder (antilogarithm).
//
// Rebuilds the product 2^c * (1 + f) from the summed characteristic c and
// mantissa f. The normalised mantissa {1, f} is an N-bit value whose binary
// point sits after its MSB, so it must move by c - (N-1) places:
//   large characteristic (c >= N-1): shift left by c-(N-1), 0..N places;
//   small characteristic (c <  N-1): shift right by (N-1)-c, dropping the
//                                    fraction bits that fall off (truncation).
// Only the large case can set the upper N product bits, so those bits are
// the left-shift result ANDed with the is_large flag; only the lower N bits
// need a 2:1 multiplexer between the cases.
//
// Interface: c (log2 N + 1 bits), f (N-1 bits) in; p (2N bits) out.
// Purely combinational.
module mitchell_decoder
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [L:0]     c,
  input  logic [N-2:0]   f,
  output logic [2*N-1:0] p
);

  localparam logic [L:0] NM1 = (L+1)'(N - 1);

  logic [N-1:0]   norm;
  logic           is_large;
  logic [L:0]     lshamt;   // c - (N-1), used when is_large
  logic [L-1:0]   rshamt;   // (N-1) - c, used when small
  logic [2*N-1:0] lshifted;
  logic [N-1:0]   rshifted;

  assign norm     = {1'b1, f};
  assign is_large = (c >= NM1);
  assign lshamt   = c - NM1;
  assign rshamt   = L'(NM1 - c);
  assign lshifted = {{N{1'b0}}, norm} << lshamt;
  assign rshifted = norm >> rshamt;

  assign p[2*N-1:N] = lshifted[2*N-1:N] & {N{is_large}};
  assign p[N-1:0]   = is_large ? lshifted[N-1:0] : rshifted;

endmodule
