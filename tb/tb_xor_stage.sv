// tb_xor_stage: random words through a 33-bit and a 7-bit xor_stage; every
// output bit must be 1 exactly where the two inputs differ.
module tb_xor_stage;
  logic [32:0] a1, b1, d1;
  logic [6:0]  a2, b2, d2;
  int checks = 0, failures = 0;

  xor_stage #(.W(33)) dut1 (.a_i(a1), .b_i(b1), .diff_o(d1));
  xor_stage #(.W(7))  dut2 (.a_i(a2), .b_i(b2), .diff_o(d2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      a1 = 33'({$urandom, $urandom});
      b1 = (n % 3 == 0) ? a1 : 33'({$urandom, $urandom});
      a2 = 7'($urandom);
      b2 = 7'($urandom);
      #1;
      for (int i = 0; i < 33; i++) begin
        checks++;
        if (d1[i] != (a1[i] != b1[i])) failures++;
      end
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (d2[i] != (a2[i] != b2[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
