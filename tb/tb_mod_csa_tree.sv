// tb_mod_csa_tree: checks the Wallace tree of modulo (2^n + 1) carry-save
// adders. For random rows, sum + carry must equal the sum of the rows plus
// one per full-adder row (ROWS - 2) modulo 2^n + 1. Instances: n = 16 with
// 17 rows (the multiplier's size), n = 8 with 4 rows, n = 5 with 3 rows.
module tb_mod_csa_tree;

  int checks = 0;
  int failures = 0;

  logic [15:0] r16 [17];
  logic [15:0] s16, c16;
  logic [7:0]  r8 [4];
  logic [7:0]  s8, c8;
  logic [4:0]  r5 [3];
  logic [4:0]  s5, c5;

  mod_csa_tree dut16 (.rows_i(r16), .sum_o(s16), .carry_o(c16));
  mod_csa_tree #(.N(8), .ROWS(4)) dut8 (.rows_i(r8), .sum_o(s8), .carry_o(c8));
  mod_csa_tree #(.N(5), .ROWS(3)) dut5 (.rows_i(r5), .sum_o(s5), .carry_o(c5));

  task automatic cmp(int n, longint unsigned total, int rows, longint unsigned s, longint unsigned c);
    longint unsigned m = (64'd1 << n) + 1;
    checks++;
    if ((s + c) % m != (total + 64'(rows - 2)) % m) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d rows=%0d sum=%h carry=%h", n, rows, s, c);
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
    longint unsigned t;
    for (int i = 0; i < 20000; i++) begin
      t = 0;
      for (int j = 0; j < 17; j++) begin
        r16[j] = (i < 2) ? {16{i[0]}} : 16'($urandom);
        t += 64'(r16[j]);
      end
      #1;
      cmp(16, t, 17, 64'(s16), 64'(c16));
      t = 0;
      for (int j = 0; j < 4; j++) begin
        r8[j] = 8'($urandom);
        t += 64'(r8[j]);
      end
      #1;
      cmp(8, t, 4, 64'(s8), 64'(c8));
      t = 0;
      for (int j = 0; j < 3; j++) begin
        r5[j] = 5'($urandom);
        t += 64'(r5[j]);
      end
      #1;
      cmp(5, t, 3, 64'(s5), 64'(c5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
