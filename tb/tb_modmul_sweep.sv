// tb_modmul_sweep: the multiplier at every operand width from 2 to 32 bits,
// the range over which the design's delay and area are compared. One
// instance per width; each gets its corner operands (0, 1, 2^n - 1) and
// 2000 random pairs, checked against a 128-bit integer reference (0 read as
// 2^n, 2^n written back as 0). Widths up to 8 are run exhaustively. Also
// checks that the Wallace tree depth of the package, for r rows, equals
// the stage count the design's comparison tabulates for an r-bit input
// (1 for 3 rows, 2 for 4, 3 for 5-6, 4 for 7-9, 5 for 10-13, 6 for 14-19,
// 7 for 20-28, 8 for 29-42, 9 for 43-63, 10 for 64).
module tb_modmul_sweep;
  import modmul_pkg::*;

  localparam int NMIN = 2;
  localparam int NMAX = 32;

  int checks = 0;
  int failures = 0;

  function automatic logic [127:0] ref_mul(logic [127:0] a, logic [127:0] b, int n);
    logic [127:0] two_n = 128'd1 << n;
    logic [127:0] aa = (a == 0) ? two_n : a;
    logic [127:0] bb = (b == 0) ? two_n : b;
    logic [127:0] r = (aa * bb) % (two_n + 1);
    return (r == two_n) ? 128'd0 : r;
  endfunction

  function automatic int table_depth(int r);
    if (r <= 3)  return 1;
    if (r == 4)  return 2;
    if (r <= 6)  return 3;
    if (r <= 9)  return 4;
    if (r <= 13) return 5;
    if (r <= 19) return 6;
    if (r <= 28) return 7;
    if (r <= 42) return 8;
    if (r <= 63) return 9;
    return 10;
  endfunction

  bit [NMAX:NMIN] done;

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_n
    logic [n-1:0] x, y, p;
    modmul #(.N(n)) dut (.x(x), .y(y), .p(p));

    task automatic one(logic [n-1:0] a, logic [n-1:0] b);
      x = a;
      y = b;
      #1;
      checks++;
      if (128'(p) != ref_mul(128'(a), 128'(b), n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d %h * %h = %h", n, a, b, p);
      end
    endtask

    initial begin
      #(n * 100000);  // widths take turns
      if (n <= 8) begin
        for (int a = 0; a < (1 << n); a++)
          for (int b = 0; b < (1 << n); b++) one(n'(a), n'(b));
      end else begin
        one('0, '0);
        one('0, '1);
        one('1, '0);
        one('1, '1);
        one(n'(1), '0);
        for (int i = 0; i < 2000; i++) one(n'({$urandom, $urandom}), n'({$urandom, $urandom}));
      end
      done[n] = 1'b1;
    end
  end

  initial begin
    #100000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    done = '0;
    for (int r = 3; r <= 64; r++) begin
      checks++;
      if (csa_levels(r) != table_depth(r)) begin
        failures++;
        $display("FAIL depth for %0d rows: %0d, table %0d", r, csa_levels(r), table_depth(r));
      end
    end
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
