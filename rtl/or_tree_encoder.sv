// OR-tree encoder.
//
// Turns the one-hot leading-one vector h from the LOD into the binary index
// k of its set bit. Output bit b is the OR of every h[j] whose index j has
// bit b set; because h is one-hot (or all zero) no priority logic is needed,
// which is what keeps this encoder to a tree of OR gates. An all-zero h
// gives k = 0; the multiplier handles that case with its zero detector.
//
// Interface: h (N bits) in, k (log2 N bits) out. Purely combinational.
module or_tree_encoder
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned L = $clog2(N)
) (
  input  logic [N-1:0] h,
  output logic [L-1:0] k
);

  // Constant mask per output bit: positions j with bit b of j set.
  function automatic logic [N-1:0] index_mask(int unsigned bitpos);
    logic [N-1:0] msk;
    for (int unsigned j = 0; j < N; j++) msk[j] = ((j >> bitpos) & 1) != 0;
    return msk;
  endfunction

  for (genvar b = 0; b < L; b++) begin : g_bit
    localparam logic [N-1:0] MASK = index_mask(b);
    assign k[b] = |(h & MASK);
  end

endmodule
