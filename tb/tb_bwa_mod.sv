// tb_bwa_mod: the modified accumulator on all inputs of an 8-input and a
// 5-input instance, plus random inputs of a 16-input one. With c the number of
// 1's: if or_o is 0 then c == w1 + 2*popcount(w2); if or_o is 1 then c >= 4;
// and or_o must be 0 whenever c < 4. Also counts that both outcomes of the OR
// flag were seen.
module tb_bwa_mod;
  logic [7:0]  i8;
  logic        w1_8, or_8;
  logic [2:0]  w2_8;
  logic [4:0]  i5;
  logic        w1_5, or_5;
  logic [2:0]  w2_5;
  logic [15:0] i16;
  logic        w1_16, or_16;
  logic [3:0]  w2_16;
  int checks = 0, failures = 0, or_seen = 0;

  bwa_mod #(.N(8))  dut8  (.in_i(i8),  .w1_o(w1_8),  .w2_o(w2_8),  .or_o(or_8));
  bwa_mod #(.N(5))  dut5  (.in_i(i5),  .w1_o(w1_5),  .w2_o(w2_5),  .or_o(or_5));
  bwa_mod #(.N(16)) dut16 (.in_i(i16), .w1_o(w1_16), .w2_o(w2_16), .or_o(or_16));

  task automatic judge(int c, logic w1, int w2ones, logic orf, string what);
    checks++;
    if (orf) begin
      or_seen++;
      if (c < 4) begin
        failures++;
        $display("FAIL %s: or set with count %0d", what, c);
      end
    end else if (c != int'(w1) + 2 * w2ones) begin
      failures++;
      $display("FAIL %s: count %0d, w1=%0d w2 ones=%0d", what, c, w1, w2ones);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      i8 = 8'(v); i5 = 5'(v); i16 = '0;
      #1;
      judge($countones(8'(v)), w1_8, $countones(w2_8), or_8, "bwa_mod8");
      judge($countones(5'(v)), w1_5, $countones(w2_5), or_5, "bwa_mod5");
    end
    for (int n = 0; n < 1000; n++) begin
      i16 = 16'($urandom);
      if (n % 2 == 0) i16 &= 16'($urandom) & 16'($urandom);
      #1;
      judge($countones(i16), w1_16, $countones(w2_16), or_16, "bwa_mod16");
    end
    checks++;
    if (or_seen == 0) begin
      failures++;
      $display("FAIL the OR flag never fired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
