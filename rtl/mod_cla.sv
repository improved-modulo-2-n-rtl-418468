// mod_cla: modulo (2^n + 1) carry-lookahead adder with radix-4 groups.
//
// Adds the carry and sum vectors of the carry-save tree and reduces the
// result modulo 2^n + 1 in a single carry-propagate pass. Bit generate is
// g_i = a_i & b_i and bit propagate p_i = a_i | b_i. Group generate and
// propagate are formed in ceil(log4 n) lookahead levels: level 1 forms, inside
// every 4-bit group, the prefix terms g(i,k) and p(i,k) from the group's
// lowest bit k up to every bit i; each further level joins four neighbouring
// groups of the previous level, giving each bit the prefix from the start of
// the larger group (for n = 16: a first step on four 4-bit groups and a
// second step with a first, second and third block for bits 4-7, 8-11 and
// 12-15). After the last level every bit has g(i,0) and p(i,0).
// The carry out of the top bit, g(n-1,0), is inverted and used as the carry
// into bit 0; the carry into every bit then follows from
//     c_i = g(i-1,0) | p(i-1,0) & ~g(n-1,0),
// and the sum bit is (a_i ^ b_i) ^ c_i.
//
// Feeding the inverted carry back adds one to the sum, so the result is
//     s = (a + b + 1) mod (2^n + 1),
// with the value 2^n given as 0 (the IDEA convention for 2^n).
//
// The sum bit uses a_i ^ b_i rather than the OR propagate, since the OR form
// gives a wrong sum when both bits are one; the carry network uses the OR
// form as described above. Purely combinational.
module mod_cla
  import modmul_pkg::*;
#(
  parameter int N = 16  // operand width n
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  localparam int L = clog4(N);

  logic [N-1:0] gp [L+1];  // gp[l][i]: generate from the start of i's 4^l block to i
  logic [N-1:0] pp [L+1];  // pp[l][i]: propagate over the same span
  logic [N-1:0] cin;       // carry into every bit after the end-around feedback
  logic         cout_n;    // inverted carry out of the top bit

  always_comb begin
    gp[0] = a & b;
    pp[0] = a | b;
    for (int l = 1; l <= L; l++) begin
      for (int i = 0; i < N; i++) begin
        int blk, sub, start, sidx;
        logic cin_sub, pall;
        sub   = 4 ** (l - 1);
        blk   = 4 * sub;
        start = i - (i % blk);
        sidx  = (i % blk) / sub;
        // carry into sub-block sidx from the start of its block, written out
        // as a sum of products over the lower sub-blocks' group terms
        cin_sub = 1'b0;
        pall    = 1'b1;
        for (int t = 0; t < 4; t++) begin
          if (t < sidx) begin
            logic term;
            term = gp[l-1][start + (t + 1) * sub - 1];
            for (int u = 0; u < 4; u++)
              if (u > t && u < sidx) term = term & pp[l-1][start + (u + 1) * sub - 1];
            cin_sub = cin_sub | term;
            pall    = pall & pp[l-1][start + (t + 1) * sub - 1];
          end
        end
        gp[l][i] = gp[l-1][i] | (pp[l-1][i] & cin_sub);
        pp[l][i] = pp[l-1][i] & pall;
      end
    end
    cout_n = ~gp[L][N-1];
    cin[0] = cout_n;
    for (int i = 1; i < N; i++) cin[i] = gp[L][i-1] | (pp[L][i-1] & cout_n);
    s = (a ^ b) ^ cin;
  end

endmodule
