// idea_core: IDEA block cipher (encryption or decryption) built around four
// modulo (2^16 + 1) multipliers.
//
// One round of IDEA is built in hardware and reused: eight times for the
// full rounds and a ninth time, half-used, for the output transformation
// ("8.5 rounds"). The round is cut into four pipeline stages, one multiplier
// on each of the first three, so that the three multipliers of the round's
// critical path sit in different stages:
//   stage 1  s0 = X0 * K0, s1 = X1 + K1, s2 = X2 + K2, s3 = X3 * K3
//   stage 2  t_a = (s0 ^ s2) * K4
//   stage 3  t_b = ((s1 ^ s3) + t_a) * K5
//   stage 4  t_c = t_a + t_b;
//            X' = (s0 ^ t_b, s2 ^ t_b, s1 ^ t_c, s3 ^ t_c)
// where * is multiplication modulo 2^16 + 1 (0 standing for 2^16), + is
// addition modulo 2^16 and K0..K5 are the round's subkeys 6r..6r+5.
// Stage 4 feeds stage 1 again. After eight rounds the block enters stage 1
// once more and gets the output transformation with subkeys 48..51:
// Y = (X0 * K48, X2 + K49, X1 + K50, X3 * K51) (the X1/X2 exchange undoes
// the exchange of the last round). The result leaves from the stage-1
// register and the slot becomes free.
//
// The four stage registers form a ring with four slots. A new block enters
// stage 1 whenever the slot arriving from stage 4 is empty. Decryption is
// the same process with decryption subkeys.
//
// Interface: in_valid/in_ready handshake for a 64-bit block (word 0 in bits
// 63:48); a block is taken on a clock edge with in_valid and in_ready high.
// out_valid is high for one cycle with out_block; there is no back-pressure
// on the output. subkey[0..51] must stay stable while blocks that use them
// are in flight. Timing: the result appears 32 cycles after the edge that
// took the block (8 rounds x 4 stages, then the output transformation in
// stage 1). Four blocks taken back to back leave in four consecutive cycles;
// with the ring full a slot is busy for 36 cycles (32 + 1 for the output
// transformation + 3 to come back round), so steady throughput is four
// blocks per 36 cycles.
//
// IDEA's round itself, the split into four stages, the ring of slots, the
// handshake and the reset (asynchronous, active low, clearing all stage
// registers) are this design's choices: the document states only that one
// round is reused 8.5 times with four pipeline stages per round. The subkey
// schedule is outside this block.
module idea_core
  import idea_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_block,
  input  word_t       subkey [NSUBKEY],
  output logic        out_valid,
  output logic [63:0] out_block
);

  slot_t r1, r2, r3, r4;      // stage registers
  slot_t src;                 // what enters stage 1 this cycle
  slot_t n1, n2, n3, n4;      // next values of the stage registers

  // ---- stage 1: two multiplications, two additions, or the output transformation
  word_t k1_0, k1_1, k1_2, k1_3, m1_0, m1_3, a1_in, a2_in;
  logic  last_in;
  int    kb1;

  always_comb begin
    if (r4.valid) begin
      src = r4;
    end else begin
      src       = '0;
      src.valid = in_valid;
      src.rnd   = '0;
      src.w0    = in_block[63:48];
      src.w1    = in_block[47:32];
      src.w2    = in_block[31:16];
      src.w3    = in_block[15:0];
    end
    last_in = (src.rnd == rnd_t'(ROUNDS));
    kb1     = (src.rnd <= rnd_t'(ROUNDS)) ? 6 * int'(src.rnd) : 0;
    k1_0    = subkey[kb1];
    k1_1    = subkey[kb1 + 1];
    k1_2    = subkey[kb1 + 2];
    k1_3    = subkey[kb1 + 3];
    a1_in   = last_in ? src.w2 : src.w1;
    a2_in   = last_in ? src.w1 : src.w2;
  end

  modmul #(.N(W)) u_mul0 (.x(src.w0), .y(k1_0), .p(m1_0));
  modmul #(.N(W)) u_mul3 (.x(src.w3), .y(k1_3), .p(m1_3));

  always_comb begin
    n1       = src;
    n1.last  = last_in;
    n1.w0    = m1_0;
    n1.w1    = add16(a1_in, k1_1);
    n1.w2    = add16(a2_in, k1_2);
    n1.w3    = m1_3;
    n1.t_a   = '0;
    n1.t_b   = '0;
  end

  // ---- stage 2: t_a = (s0 ^ s2) * K4
  word_t k2, m2;
  always_comb k2 = (r1.rnd < rnd_t'(ROUNDS)) ? subkey[6 * int'(r1.rnd) + 4] : '0;

  modmul #(.N(W)) u_mul4 (.x(r1.w0 ^ r1.w2), .y(k2), .p(m2));

  always_comb begin
    n2       = r1;
    n2.valid = r1.valid & ~r1.last;
    n2.t_a   = m2;
  end

  // ---- stage 3: t_b = ((s1 ^ s3) + t_a) * K5
  word_t k3, m3;
  always_comb k3 = (r2.rnd < rnd_t'(ROUNDS)) ? subkey[6 * int'(r2.rnd) + 5] : '0;

  modmul #(.N(W)) u_mul5 (.x(add16(r2.w1 ^ r2.w3, r2.t_a)), .y(k3), .p(m3));

  always_comb begin
    n3     = r2;
    n3.t_b = m3;
  end

  // ---- stage 4: t_c = t_a + t_b, mixing and exchange of the middle words
  word_t t_c;
  always_comb begin
    t_c    = add16(r3.t_a, r3.t_b);
    n4     = r3;
    n4.w0  = r3.w0 ^ r3.t_b;
    n4.w1  = r3.w2 ^ r3.t_b;
    n4.w2  = r3.w1 ^ t_c;
    n4.w3  = r3.w3 ^ t_c;
    n4.rnd = r3.rnd + rnd_t'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
      r4 <= '0;
    end else begin
      // a block that has finished all rounds never travels past stage 1
      assert (!r2.valid || r2.rnd < rnd_t'(ROUNDS));
      assert (!r4.valid || r4.rnd <= rnd_t'(ROUNDS));
      r1 <= n1;
      r2 <= n2;
      r3 <= n3;
      r4 <= n4;
    end
  end

  assign in_ready  = ~r4.valid;
  assign out_valid = r1.valid & r1.last;
  assign out_block = {r1.w0, r1.w1, r1.w2, r1.w3};

endmodule
