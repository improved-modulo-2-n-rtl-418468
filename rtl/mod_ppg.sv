// mod_ppg: partial product matrix of the modulo (2^n + 1) multiplier for
// non-zero operands.
//
// Row j holds the operand X shifted left by j positions and ANDed with bit
// y_j. Bits that would fall at weight 2^(n+k) are folded back to weight 2^k
// and inverted, because 2^n = -1 modulo 2^n + 1 and -b = ~b - 1. So row j,
// column k is x_(k-j) & y_j for k >= j and ~(x_(n+k-j) & y_j) for k < j.
// The matrix is n x n; the handling of zero operands is not part of it (it
// lives in the separate zero-case handler), which keeps this block at one
// gate of delay. Since ~b = -b + 1, row j is worth y_j * X * 2^j + (2^j - 1)
// modulo 2^n + 1; the multiplier cancels that excess with one constant row
// (see modmul.sv).
//
// The matrix layout is the published one; reading P_ij as x_i & y_j (rather
// than y_i & x_j) is this design's choice and changes nothing.
//
// Purely combinational. Ports: x, y operands; pp[j] is row j.
module mod_ppg #(
  parameter int N = 16  // operand width n
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] pp [N]
);

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int k = 0; k < N; k++) begin
        if (k >= j) pp[j][k] = x[k-j] & y[j];
        else        pp[j][k] = ~(x[N+k-j] & y[j]);
      end
    end
  end

endmodule
