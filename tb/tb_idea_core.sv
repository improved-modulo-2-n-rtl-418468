// tb_idea_core: end-to-end test of the IDEA core at its default parameters.
//
// The reference is a plain behavioural IDEA (16-bit words, multiplication
// modulo 65537 with 0 read as 65536, the standard key schedule that rotates
// the 128-bit key left by 25 bits between groups of eight subkeys, and the
// standard decryption subkeys). Its encryption of the published test vector
// (key 0001..0008, plaintext 0000 0001 0002 0003, ciphertext
// 11FB ED2B 0198 6DE5) is checked first, so the reference is not simply
// trusted. The core is then run through:
//   1. the test vector alone, checking the 32-cycle latency;
//   2. four blocks back to back (ring full), a fifth that must stall, and
//      the steady throughput of four blocks per 36 cycles;
//   3. random blocks with random gaps under random keys;
//   4. decryption of ciphertexts with decryption subkeys;
//   5. an all-zero key and all-zero blocks, which drive zero operands into
//      the multipliers (their zero-case handler).
// Every output is compared in order with the reference. Mechanisms counted
// and required at least once: input stall, ring full (four blocks in
// flight), output transformation (one per output), decryption, zero
// operands at a multiplier.
module tb_idea_core;
  import idea_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  logic [63:0] in_block = '0;
  word_t       subkey [NSUBKEY];
  logic        out_valid;
  logic [63:0] out_block;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_full = 0, n_out = 0, n_decrypt = 0, n_zero_ops = 0;
  int cycle = 0;
  int in_flight = 0;

  logic [63:0] expected [$];
  int          accept_cycle [$];
  int          last_latency = 0;
  int          last_out_cycle = 0;

  idea_core dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_block, .subkey, .out_valid, .out_block
  );

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  function automatic word_t ref_mul(word_t a, word_t b);
    longint unsigned aa = (a == 0) ? 65536 : longint'(a);
    longint unsigned bb = (b == 0) ? 65536 : longint'(b);
    longint unsigned r = (aa * bb) % 65537;
    if (a == 0 || b == 0) n_zero_ops++;
    return word_t'(r);  // 65536 becomes 0
  endfunction

  function automatic word_t ref_inv(word_t a);
    // a^(65537-2) modulo 65537; 0 (= 65536 = -1) is its own inverse
    longint unsigned base = (a == 0) ? 65536 : longint'(a);
    longint unsigned r = 1;
    int e = 65535;
    while (e > 0) begin
      if (e & 1) r = (r * base) % 65537;
      base = (base * base) % 65537;
      e = e >> 1;
    end
    return word_t'(r);
  endfunction

  typedef word_t keys_t [NSUBKEY];

  function automatic keys_t ref_schedule(logic [127:0] key);
    keys_t k;
    logic [127:0] kk = key;
    for (int i = 0; i < NSUBKEY; i++) begin
      if (i > 0 && i % 8 == 0) kk = {kk[102:0], kk[127:103]};
      k[i] = kk[127 - 16 * (i % 8) -: 16];
    end
    return k;
  endfunction

  function automatic keys_t ref_decrypt_keys(keys_t k);
    keys_t d;
    d[0] = ref_inv(k[48]);
    d[1] = -k[49];
    d[2] = -k[50];
    d[3] = ref_inv(k[51]);
    for (int r = 1; r < ROUNDS; r++) begin
      int b = 48 - 6 * r;
      d[6*r-2] = k[b+4];
      d[6*r-1] = k[b+5];
      d[6*r]   = ref_inv(k[b]);
      d[6*r+1] = -k[b+2];
      d[6*r+2] = -k[b+1];
      d[6*r+3] = ref_inv(k[b+3]);
    end
    d[46] = k[4];
    d[47] = k[5];
    d[48] = ref_inv(k[0]);
    d[49] = -k[1];
    d[50] = -k[2];
    d[51] = ref_inv(k[3]);
    return d;
  endfunction

  function automatic logic [63:0] ref_idea(logic [63:0] blk, keys_t k);
    word_t x0 = blk[63:48], x1 = blk[47:32], x2 = blk[31:16], x3 = blk[15:0];
    word_t s0, s1, s2, s3, ta, tb, tc;
    for (int r = 0; r < ROUNDS; r++) begin
      s0 = ref_mul(x0, k[6*r]);
      s1 = x1 + k[6*r+1];
      s2 = x2 + k[6*r+2];
      s3 = ref_mul(x3, k[6*r+3]);
      ta = ref_mul(s0 ^ s2, k[6*r+4]);
      tb = ref_mul((s1 ^ s3) + ta, k[6*r+5]);
      tc = ta + tb;
      x0 = s0 ^ tb;
      x1 = s2 ^ tb;
      x2 = s1 ^ tc;
      x3 = s3 ^ tc;
    end
    return {ref_mul(x0, k[48]), word_t'(x2 + k[49]), word_t'(x1 + k[50]), ref_mul(x3, k[51])};
  endfunction

  // ---------------- monitor ----------------
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready) begin
        in_flight++;
        accept_cycle.push_back(cycle);
      end
      if (in_flight == 4) n_full++;
      if (out_valid) begin
        checks++;
        n_out++;
        in_flight--;
        if (expected.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %h", out_block);
        end else begin
          logic [63:0] e;
          e = expected.pop_front();
          if (out_block !== e) begin
            failures++;
            if (failures < 10) $display("FAIL out %h expected %h", out_block, e);
          end
        end
        last_latency   = cycle - accept_cycle.pop_front();
        last_out_cycle = cycle;
      end
    end
  end

  // ---------------- stimulus ----------------
  // inputs change only at falling edges, away from the sampling edge; send
  // and drain are entered and left right after a falling edge, so blocks
  // sent one after the other are offered in consecutive cycles
  task automatic send(logic [63:0] blk, keys_t k);
    expected.push_back(ref_idea(blk, k));
    in_valid = 1'b1;
    in_block = blk;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (in_flight != 0 || expected.size() != 0) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired: in_flight=%0d expected=%0d outs=%0d stalls=%0d", in_flight, expected.size(), n_out, n_stall);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    keys_t ek, dk;
    logic [63:0] ct [4];
    int t0, t1;

    ek = ref_schedule(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    check(ref_idea(64'h0000_0001_0002_0003, ek) == 64'h11FB_ED2B_0198_6DE5,
          "reference model against the published test vector");
    dk = ref_decrypt_keys(ek);
    check(ref_idea(64'h11FB_ED2B_0198_6DE5, dk) == 64'h0000_0001_0002_0003,
          "reference decryption of the test vector");
    subkey = ek;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);

    // 1. test vector alone, latency
    send(64'h0000_0001_0002_0003, ek);
    drain();
    // taken at edge c, in the stage-1 register from edge c + 32, sampled at c + 33
    check(last_latency == 33, $sformatf("latency %0d, expected 33", last_latency));

    // 2. four back to back, a fifth stalls; then throughput over 40 blocks
    for (int i = 0; i < 5; i++) send({$urandom, $urandom}, ek);
    drain();
    t0 = cycle;
    for (int i = 0; i < 40; i++) send({$urandom, $urandom}, ek);
    drain();
    t1 = last_out_cycle;
    // the first block is accepted at the first edge after t0 and sampled at
    // the output 33 edges later; each further batch of four starts 36 cycles
    // after the previous one; the last batch's four outputs are consecutive
    $display("40 blocks: %0d cycles from first input to last output", t1 - t0);
    check(t1 - t0 == 33 + 9 * 36 + 3, $sformatf("throughput: %0d cycles for 40 blocks", t1 - t0));

    // 3. random keys and blocks with random gaps
    for (int kset = 0; kset < 6; kset++) begin
      ek = ref_schedule({$urandom, $urandom, $urandom, $urandom});
      subkey = ek;
      for (int i = 0; i < 30; i++) begin
        send({$urandom, $urandom}, ek);
        repeat ($urandom % 4) @(negedge clk);
      end
      drain();
    end

    // 4. decryption of four ciphertexts
    ek = ref_schedule({$urandom, $urandom, $urandom, $urandom});
    dk = ref_decrypt_keys(ek);
    for (int i = 0; i < 4; i++) begin
      logic [63:0] pt;
      pt = {$urandom, $urandom};
      ct[i] = ref_idea(pt, ek);
      check(ref_idea(ct[i], dk) == pt, "reference round trip");
    end
    subkey = dk;
    for (int i = 0; i < 4; i++) begin
      send(ct[i], dk);
      n_decrypt++;
    end
    drain();

    // 5. zero key and zero blocks: zero operands at the multipliers
    ek = ref_schedule('0);
    subkey = ek;
    send(64'h0, ek);
    send(64'h0000_0001_0000_FFFF, ek);
    drain();

    $display("stalls=%0d full=%0d outputs=%0d decrypt=%0d zero_ops=%0d",
             n_stall, n_full, n_out, n_decrypt, n_zero_ops);
    check(n_stall > 0, "input stall never happened");
    check(n_full > 0, "ring never held four blocks");
    check(n_out > 0, "output transformation never happened");
    check(n_decrypt > 0, "no decryption");
    check(n_zero_ops > 0, "no zero operand at a multiplier");
    check(expected.size() == 0, "outputs missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
