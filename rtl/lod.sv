// Fully parallel leading-one detector (LOD).
//
// Marks the most significant set bit of z with a one-hot vector h. The
// structure is a Kogge-Stone style prefix OR that runs from the MSB down:
//   m[0][j] = z[j]
//   m[i][j] = m[i-1][j]                        if (N-1-j) <  2^(i-1)
//   m[i][j] = m[i-1][j] | m[i-1][j+2^(i-1)]    otherwise
// after log2(N) levels m[L][j] is the OR of z[N-1:j], and
//   h[N-1] = z[N-1],   h[j] = z[j] & ~m[L][j+1]  (j < N-1).
// This recurrence is the one the multiplier was designed around; only the
// gate-level mapping is left to synthesis.
//
// Interface: z (N bits) in, h (N bits, one-hot, all zero for z == 0) out.
// Timing: purely combinational, depth log2(N) OR levels plus one AND.
module lod
  import mitchell_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] h
);

  localparam int unsigned L = $clog2(N);

  // m[i] is prefix-OR level i
  logic [N-1:0] m [L+1];

  assign m[0] = z;

  for (genvar i = 1; i <= L; i++) begin : g_level
    for (genvar j = 0; j < N; j++) begin : g_bit
      if ((N - 1 - j) < (1 << (i - 1))) begin : g_pass
        assign m[i][j] = m[i-1][j];
      end else begin : g_or
        assign m[i][j] = m[i-1][j] | m[i-1][j + (1 << (i - 1))];
      end
    end
  end

  assign h[N-1] = z[N-1];
  for (genvar j = 0; j < N - 1; j++) begin : g_onehot
    assign h[j] = z[j] & ~m[L][j+1];
  end

  initial begin
    assert (N >= 2 && (1 << L) == N)
      else $error("lod: N must be a power of two (got %0d)", N);
  end

endmodule
