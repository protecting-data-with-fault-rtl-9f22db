// tb_ecc_encoder: the (40,33) encoder against an independently built
// parity-check matrix, on every one-hot data word and on random words. Also
// checks the code is SEC-DED: code words of tags that differ in one or two
// bits are at least 4 apart, and all single-bit data errors give distinct,
// nonzero syndromes that differ from every parity-bit syndrome.
module tb_ecc_encoder;
  import ecc_ref_pkg::*;

  localparam int K = 33, R = 7;

  logic [K-1:0] d, d2;
  logic [R-1:0] p, p2;
  int checks = 0, failures = 0;

  ecc_encoder #(.K(K), .R(R)) dut  (.data_i(d),  .parity_o(p));
  ecc_encoder #(.K(K), .R(R)) dut2 (.data_i(d2), .parity_o(p2));

  task automatic check(logic [R-1:0] got, logic [R-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0] synd [K];

  initial begin
    d2 = '0;
    d = '0; #1; check(p, '0, "zero word");
    for (int j = 0; j < K; j++) begin
      d = K'(1) << j;
      #1;
      check(p, R'(ref_parity(64'(d), K, R)), "one-hot");
      synd[j] = p;
      checks++;
      if ($countones(p) < 3 || $countones(p) % 2 == 0) begin
        failures++;
        $display("FAIL column %0d has weight %0d", j, $countones(p));
      end
    end
    for (int a = 0; a < K; a++)
      for (int b = a + 1; b < K; b++) begin
        checks++;
        if (synd[a] == synd[b]) begin
          failures++;
          $display("FAIL columns %0d and %0d equal", a, b);
        end
      end
    for (int n = 0; n < 1000; n++) begin
      d  = K'({$urandom, $urandom});
      d2 = d ^ (K'(1) << ($urandom % K));
      if (n % 2 == 1) d2 ^= K'(1) << ($urandom % K);
      #1;
      check(p, R'(ref_parity(64'(d), K, R)), "random");
      checks++;
      if (d2 != d && $countones({d, p} ^ {d2, p2}) < 4) begin
        failures++;
        $display("FAIL distance %0d < 4", $countones({d, p} ^ {d2, p2}));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
