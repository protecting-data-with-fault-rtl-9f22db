// tb_half_adder: exhaustive check of the half adder, a + b == s + 2c for all
// four input pairs.
module tb_half_adder;
  logic a, b, s, c;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (int'(a) + int'(b) != int'(s) + 2 * int'(c)) begin
        failures++;
        $display("FAIL a=%0d b=%0d s=%0d c=%0d", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
