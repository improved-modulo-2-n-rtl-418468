// tb_modmul: self-checking test of the modulo (2^n + 1) multiplier.
//
// Three instances: n = 16 (the IDEA width, default parameters) with all
// corner operands (0, 1, 2, 2^n-1, 2^n-2, powers of two) and 200000 random
// pairs, n = 8 and n = 4 exhaustively. The reference multiplies the
// operands as integers, with 0 read as 2^n, reduces modulo 2^n + 1 and
// writes 2^n back as 0. Counts how many checks had a zero operand (the
// zero-case handler) and fails if none did.
module tb_modmul;

  int checks = 0;
  int failures = 0;
  int zero_cases = 0;

  logic [15:0] x16, y16, p16;
  logic [7:0]  x8, y8, p8;
  logic [3:0]  x4, y4, p4;

  modmul dut16 (.x(x16), .y(y16), .p(p16));
  modmul #(.N(8)) dut8 (.x(x8), .y(y8), .p(p8));
  modmul #(.N(4)) dut4 (.x(x4), .y(y4), .p(p4));

  function automatic longint unsigned ref_mul(longint unsigned a, longint unsigned b, int n);
    longint unsigned m = (64'd1 << n) + 1;
    longint unsigned aa = (a == 0) ? (64'd1 << n) : a;
    longint unsigned bb = (b == 0) ? (64'd1 << n) : b;
    longint unsigned r = (aa * bb) % m;
    return (r == (64'd1 << n)) ? 64'd0 : r;
  endfunction

  task automatic check16(logic [15:0] a, logic [15:0] b);
    x16 = a;
    y16 = b;
    #1;
    checks++;
    if (a == 0 || b == 0) zero_cases++;
    if (64'(p16) != ref_mul(64'(a), 64'(b), 16)) begin
      failures++;
      if (failures < 10) $display("FAIL n=16 %h * %h = %h, expected %h", a, b, p16, ref_mul(64'(a), 64'(b), 16));
    end
  endtask

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [12];
    corners = '{16'h0000, 16'h0001, 16'h0002, 16'h0003, 16'hFFFF, 16'hFFFE,
                16'h8000, 16'h4000, 16'h00FF, 16'hFF00, 16'h5555, 16'hAAAA};
    foreach (corners[i]) foreach (corners[j]) check16(corners[i], corners[j]);
    for (int i = 0; i < 200000; i++) check16(16'($urandom), 16'($urandom));
    for (int i = 0; i < 2000; i++) check16(16'($urandom), 16'h0000);

    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);
        y8 = 8'(b);
        #1;
        checks++;
        if (a == 0 || b == 0) zero_cases++;
        if (64'(p8) != ref_mul(64'(a), 64'(b), 8)) begin
          failures++;
          if (failures < 10) $display("FAIL n=8 %h * %h = %h", a, b, p8);
        end
      end
    end

    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        x4 = 4'(a);
        y4 = 4'(b);
        #1;
        checks++;
        if (a == 0 || b == 0) zero_cases++;
        if (64'(p4) != ref_mul(64'(a), 64'(b), 4)) begin
          failures++;
          if (failures < 10) $display("FAIL n=4 %h * %h = %h", a, b, p4);
        end
      end
    end

    $display("zero-operand cases: %0d", zero_cases);
    if (zero_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
