// tb_mod_cla: checks the modulo (2^n + 1) carry-lookahead adder, whose
// result must be (a + b + 1) mod (2^n + 1) with 2^n given as 0. n = 16
// (two lookahead levels) with corners and random operands, n = 8 and n = 5
// exhaustively, n = 20 (three levels) at random.
module tb_mod_cla;

  int checks = 0;
  int failures = 0;

  logic [15:0] a16, b16, s16;
  logic [7:0]  a8, b8, s8;
  logic [4:0]  a5, b5, s5;
  logic [19:0] a20, b20, s20;

  mod_cla dut16 (.a(a16), .b(b16), .s(s16));
  mod_cla #(.N(8))  dut8  (.a(a8),  .b(b8),  .s(s8));
  mod_cla #(.N(5))  dut5  (.a(a5),  .b(b5),  .s(s5));
  mod_cla #(.N(20)) dut20 (.a(a20), .b(b20), .s(s20));

  task automatic cmp(int n, longint unsigned a, longint unsigned b, longint unsigned s);
    longint unsigned m = (64'd1 << n) + 1;
    longint unsigned want = (a + b + 1) % m;
    if (want == (64'd1 << n)) want = 0;
    checks++;
    if (s != want) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d %h + %h + 1 = %h, expected %h", n, a, b, s, want);
    end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [8];
    corners = '{16'h0000, 16'h0001, 16'hFFFF, 16'hFFFE, 16'h8000, 16'h7FFF, 16'h0F0F, 16'hF0F0};
    foreach (corners[i]) foreach (corners[j]) begin
      a16 = corners[i];
      b16 = corners[j];
      #1;
      cmp(16, 64'(a16), 64'(b16), 64'(s16));
    end
    for (int i = 0; i < 50000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      a20 = 20'($urandom);
      b20 = 20'($urandom);
      #1;
      cmp(16, 64'(a16), 64'(b16), 64'(s16));
      cmp(20, 64'(a20), 64'(b20), 64'(s20));
    end
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a);
        b8 = 8'(b);
        a5 = 5'(a);
        b5 = 5'(b);
        #1;
        cmp(8, 64'(a), 64'(b), 64'(s8));
        if (a < 32 && b < 32) cmp(5, 64'(a), 64'(b), 64'(s5));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
