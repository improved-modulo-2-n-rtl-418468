// idea_pkg: types and constants of the round-iterative IDEA core.
//
// A 64-bit block is four 16-bit words, word 0 being the most significant.
// IDEA has eight full rounds of six subkeys each and an output
// transformation of four subkeys, 52 subkeys in all. The core keeps one
// round of hardware split into four pipeline stages; every stage register
// holds one slot_t, so up to four blocks are in flight at once.
package idea_pkg;

  localparam int W       = 16;   // word width, the n of the multiplier
  localparam int ROUNDS  = 8;    // full rounds
  localparam int NSUBKEY = 52;   // 6 * ROUNDS + 4

  typedef logic [W-1:0] word_t;
  typedef logic [3:0]   rnd_t;   // completed rounds, 0..ROUNDS

  // contents of a pipeline stage register
  typedef struct packed {
    logic     valid;  // slot holds a block
    logic     last;   // stage 1 applied the output transformation: data is the result
    rnd_t     rnd;    // rounds completed before the current one
    word_t    w0;     // four data words; meaning depends on the stage
    word_t    w1;
    word_t    w2;
    word_t    w3;
    word_t    t_a;    // (s0 ^ s2) * K4 after stage 2
    word_t    t_b;    // ((s1 ^ s3) + t_a) * K5 after stage 3
  } slot_t;

  // addition modulo 2^16
  function automatic word_t add16(word_t a, word_t b);
    return a + b;
  endfunction

endpackage
