// tb_bwa: the general butterfly weight accumulator must encode the number of
// 1's at its input as sum over p of w_o[p] * 2^popcount(p). Checked on all
// 256 inputs of an 8-input BWA, all 64 of a 6-input one and random inputs of
// an 18-input one (padded to 32). Also checks the butterfly property that the
// single weight-8 output of the 8-input BWA is set only when all inputs are 1.
module tb_bwa;
  logic [7:0]  i8;
  logic [7:0]  w8;
  logic [5:0]  i6;
  logic [7:0]  w6;
  logic [17:0] i18;
  logic [31:0] w18;
  int checks = 0, failures = 0;

  bwa #(.N(8))  dut8  (.in_i(i8),  .w_o(w8));
  bwa #(.N(6))  dut6  (.in_i(i6),  .w_o(w6));
  bwa #(.N(18)) dut18 (.in_i(i18), .w_o(w18));

  function automatic int weighted(logic [31:0] w, int p);
    int s = 0;
    for (int k = 0; k < p; k++) if (w[k]) s += 1 << $countones(k);
    return s;
  endfunction

  function automatic int ones(logic [31:0] v, int n);
    int s = 0;
    for (int k = 0; k < n; k++) s += int'(v[k]);
    return s;
  endfunction

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d", what, got, exp);
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
      i8 = 8'(v); i6 = 6'(v); i18 = '0;
      #1;
      check(weighted(32'(w8), 8), ones(32'(v), 8), "bwa8");
      check(int'(w8[7]), int'(v == 255), "bwa8 weight-8 bit");
      check(weighted(32'(w6), 8), ones(32'(v), 6), "bwa6");
    end
    for (int n = 0; n < 500; n++) begin
      i18 = 18'($urandom);
      if (n % 2 == 0) i18 &= 18'($urandom);
      #1;
      check(weighted(w18, 32), ones(32'(i18), 18), "bwa18");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
