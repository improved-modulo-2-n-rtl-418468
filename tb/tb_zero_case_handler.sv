// tb_zero_case_handler: checks the zero-case handler for n = 16. With x = 0
// (standing for 2^16) the output must be 2^16 * y mod 65537 for every y, in
// the IDEA form (65536 given as 0); likewise with y = 0; and it must be 0
// whenever both operands are non-zero.
module tb_zero_case_handler;

  int checks = 0;
  int failures = 0;

  logic [15:0] x, y, z;

  zero_case_handler dut (.x(x), .y(y), .z(z));

  function automatic int ref_mul(int a, int b);
    longint unsigned aa = (a == 0) ? 65536 : longint'(a);
    longint unsigned bb = (b == 0) ? 65536 : longint'(b);
    return int'(((aa * bb) % 65537) % 65536);
  endfunction

  task automatic cmp(int want);
    checks++;
    if (int'(z) != want) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h expected %h", x, y, z, want);
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
    for (int i = 0; i < 65536; i++) begin
      x = 16'h0;
      y = 16'(i);
      #1;
      cmp(ref_mul(0, i));
      x = 16'(i);
      y = 16'h0;
      #1;
      cmp(ref_mul(i, 0));
    end
    for (int i = 0; i < 20000; i++) begin
      x = 16'($urandom_range(1, 65535));
      y = 16'($urandom_range(1, 65535));
      #1;
      cmp(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
