// tb_special_adder: checks the zero-case handler's adder, s = (v + 2) mod
// 2^n, exhaustively for n = 16 and n = 5.
module tb_special_adder;

  int checks = 0;
  int failures = 0;

  logic [15:0] v16, s16;
  logic [4:0]  v5, s5;

  special_adder dut16 (.v(v16), .s(s16));
  special_adder #(.N(5)) dut5 (.v(v5), .s(s5));

  initial begin
    #10000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      v16 = 16'(i);
      v5  = 5'(i);
      #1;
      checks++;
      if (int'(s16) != (i + 2) % 65536) begin
        failures++;
        if (failures < 10) $display("FAIL n=16 %h + 2 = %h", v16, s16);
      end
      if (i < 32) begin
        checks++;
        if (int'(s5) != (i + 2) % 32) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
