// tb_mod_ppg: checks the partial product matrix of the modulo (2^n + 1)
// multiplier. For every row j the row's value modulo 2^n + 1 must be
// y_j * X * 2^j + (2^j - 1) (folded bits inverted), and bits at or above
// the diagonal must be x_(k-j) & y_j exactly. n = 16 with random and corner
// operands, n = 4 exhaustively.
module tb_mod_ppg;

  int checks = 0;
  int failures = 0;

  logic [15:0] x16, y16;
  logic [15:0] pp16 [16];
  logic [3:0]  x4, y4;
  logic [3:0]  pp4 [4];

  mod_ppg dut16 (.x(x16), .y(y16), .pp(pp16));
  mod_ppg #(.N(4)) dut4 (.x(x4), .y(y4), .pp(pp4));

  task automatic check_row(int n, longint unsigned x, longint unsigned y, int j, longint unsigned row);
    longint unsigned m = (64'd1 << n) + 1;
    longint unsigned want = ((((y >> j) & 1) * x * (64'd1 << j)) + (64'd1 << j) - 1) % m;
    checks++;
    if (row % m != want) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d x=%h y=%h row %0d = %h", n, x, y, j, row);
    end
    for (int k = j; k < n; k++) begin
      checks++;
      if (((row >> k) & 1) != (((x >> (k - j)) & 1) & ((y >> j) & 1))) failures++;
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
    for (int i = 0; i < 3000; i++) begin
      x16 = (i < 4) ? 16'(i) : 16'($urandom);
      y16 = (i < 8) ? 16'hFFFF : 16'($urandom);
      #1;
      for (int j = 0; j < 16; j++) check_row(16, 64'(x16), 64'(y16), j, 64'(pp16[j]));
    end
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a);
        y4 = 4'(b);
        #1;
        for (int j = 0; j < 4; j++) check_row(4, 64'(a), 64'(b), j, 64'(pp4[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
