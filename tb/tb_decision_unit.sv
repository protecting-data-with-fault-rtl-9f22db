// tb_decision_unit: drives the decision unit directly with the OR flag and the
// outputs of the two second-level accumulators (8 and 32 bits, as in the
// (40,33) matcher). The reference distance is the weighted sum
//   sum s1[p]*2^popcount(p) + 2 * sum s2[p]*2^popcount(p) (+4 if or_i),
// saturated at 4 and classified by TMAX = 1, RMAX = 2. Each of the four ranges
// must be reached.
module tb_decision_unit;
  import ecc_pkg::*;

  logic        or_i;
  logic [7:0]  s1;
  logic [31:0] s2;
  logic        match, fault, mismatch, corrected;
  logic [2:0]  dsat;
  dist_range_e rng;
  int checks = 0, failures = 0;
  int seen [4];

  decision_unit #(.P1(8), .P2(32), .TMAX(1), .RMAX(2)) dut (
    .or_i(or_i), .s1_i(s1), .s2_i(s2), .match(match), .fault(fault),
    .mismatch(mismatch), .corrected(corrected), .dist_sat(dsat), .range_o(rng));

  function automatic int wsum(logic [31:0] w, int p);
    int s = 0;
    for (int k = 0; k < p; k++) if (w[k]) s += 1 << $countones(k);
    return s;
  endfunction

  task automatic run_one();
    int d, r;
    #1;
    d = wsum(32'(s1), 8) + 2 * wsum(s2, 32) + (or_i ? 4 : 0);
    if (d > 4) d = 4;
    r = (d == 0) ? 0 : (d <= 1) ? 1 : (d <= 2) ? 2 : 3;
    seen[r]++;
    checks++;
    if (int'(dsat) != d || int'(rng) != r || match != (r <= 1) || corrected != (r == 1)
        || fault != (r == 2) || mismatch != (r == 3)) begin
      failures++;
      $display("FAIL or=%0d s1=%b s2=%h: dsat=%0d rng=%0d m/f/mm/c=%0d%0d%0d%0d, expected d=%0d r=%0d",
               or_i, s1, s2, dsat, rng, match, fault, mismatch, corrected, d, r);
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
    // every s1 value with s2 and or clear, then with single s2 bits
    for (int v = 0; v < 256; v++) begin
      or_i = 1'b0; s1 = 8'(v); s2 = '0; run_one();
      or_i = 1'b1; run_one();
    end
    for (int k = 0; k < 32; k++)
      for (int v = 0; v < 4; v++) begin
        or_i = 1'b0; s1 = 8'(v); s2 = 32'(1) << k; run_one();
      end
    for (int n = 0; n < 2000; n++) begin
      or_i = ($urandom % 8 == 0);
      s1 = 8'($urandom) & 8'($urandom) & 8'($urandom);
      s2 = (n % 2 == 0) ? '0 : 32'($urandom) & 32'($urandom) & 32'($urandom) & 32'($urandom);
      run_one();
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (seen[r] == 0) begin
        failures++;
        $display("FAIL range %0d never reached", r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
