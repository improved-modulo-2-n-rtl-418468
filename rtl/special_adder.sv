// special_adder: the adder of the zero-case handler, v + 2 modulo 2^n.
//
// When one operand of the multiplier is zero (standing for 2^n = -1), the
// product is -w modulo 2^n + 1, where w is the other operand. That equals
// ~w + 2 taken modulo 2^n, with 2^n again given as 0 (w = 1 gives 0, which
// stands for 2^n; w = 0, i.e. both operands zero, gives 1). This block adds
// the constant 2: bit 0 passes, and bits 1..n-1 are incremented. The carry
// into bit i (i >= 1) is the AND of bits 1..i-1, formed with the same radix-4
// lookahead as the modulo adder (ceil(log4 n) levels of 4-bit group
// propagates) but with no generate terms, since one addend is a constant.
//
// Only the cost of this adder is published; the constant 2 and the
// incrementer form are derived here. Bit 1 is a plain inversion and bits
// 2..n-1 each need one XOR, which agrees with the 2(n - 2) term of the
// published area count.
//
// Purely combinational. Ports: v input, s = (v + 2) mod 2^n.
module special_adder
  import modmul_pkg::*;
#(
  parameter int N = 16  // operand width n
) (
  input  logic [N-1:0] v,
  output logic [N-1:0] s
);

  localparam int L = clog4(N);

  logic [N-1:0] pp [L+1];  // pp[l][i]: AND of bits from the start of i's 4^l block to i
  logic [N-1:0] c;         // carry into every bit

  always_comb begin
    // bit 0 does not take part in the increment: treat it as propagating
    pp[0] = {v[N-1:1], 1'b1};
    for (int l = 1; l <= L; l++) begin
      for (int i = 0; i < N; i++) begin
        int blk, sub, start, sidx;
        logic pall;
        sub   = 4 ** (l - 1);
        blk   = 4 * sub;
        start = i - (i % blk);
        sidx  = (i % blk) / sub;
        pall  = 1'b1;
        for (int t = 0; t < 4; t++)
          if (t < sidx) pall = pall & pp[l-1][start + (t + 1) * sub - 1];
        pp[l][i] = pp[l-1][i] & pall;
      end
    end
    c[0] = 1'b0;
    for (int i = 1; i < N; i++) c[i] = pp[L][i-1];
    s = v ^ c;
  end

endmodule
