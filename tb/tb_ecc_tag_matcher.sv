// tb_ecc_tag_matcher: end-to-end test of the (40,33) tag matcher at its
// default parameters.
//
// Each trial picks a tag, a stored tag equal to it or differing in a few bits,
// encodes the stored tag with the reference code, flips 0..3 random bits of the
// stored code word (data or parity part) and applies the incoming tag. The
// reference distance is the popcount of (reference code word of the incoming
// tag) XOR (stored word); the verdict must be match for d <= 1 (corrected if
// d == 1), fault for d == 2, mismatch for d >= 3, and dist_sat = min(d, 4).
// The matcher is combinational, so outputs are sampled one time step after the
// inputs change. Counted, and each required at least once: every range, a
// corrected error in the data part and in the parity part, a fault caused by a
// double error on a matching tag, a first-level slice (8 data bits, or the 7
// parity bits) with 4 or more differences, which the first-level OR-gate trees
// must report, and a largest slice difference of 2 or 3, which only the
// weight-2 bits carry.
module tb_ecc_tag_matcher;
  import ecc_pkg::*;
  import ecc_ref_pkg::*;

  localparam int K = 33, R = 7;

  logic [K-1:0]   tag;
  logic [K+R-1:0] cw;
  logic           match, fault, mismatch, corrected;
  logic [2:0]     dsat;
  dist_range_e    rng;

  int checks = 0, failures = 0;
  int n_exact = 0, n_corr_data = 0, n_corr_par = 0, n_fault = 0, n_fault_same = 0;
  int n_mismatch = 0, n_l1_or = 0, n_w2 = 0;

  ecc_tag_matcher dut (
    .tag_in(tag), .cw_stored(cw), .match(match), .fault(fault),
    .mismatch(mismatch), .corrected(corrected), .dist_sat(dsat), .range_o(rng));

  function automatic logic [K+R-1:0] encode(logic [K-1:0] t);
    return {R'(ref_parity(64'(t), K, R)), t};
  endfunction

  task automatic trial(logic [K-1:0] t_in, logic [K-1:0] t_st, logic [K+R-1:0] err);
    int d;
    logic exp_match, exp_fault, exp_mismatch, exp_corr;
    tag = t_in;
    cw  = encode(t_st) ^ err;
    #1;
    d = $countones(encode(t_in) ^ cw);
    exp_match    = (d <= 1);
    exp_corr     = (d == 1);
    exp_fault    = (d == 2);
    exp_mismatch = (d >= 3);
    checks++;
    if (match != exp_match || fault != exp_fault || mismatch != exp_mismatch
        || corrected != exp_corr || int'(dsat) != ((d > 4) ? 4 : d)
        || int'(rng) != ((d >= 3) ? 3 : d)) begin
      failures++;
      $display("FAIL tag=%h cw=%h d=%0d: match=%0d fault=%0d mismatch=%0d corrected=%0d dsat=%0d",
               t_in, cw, d, match, fault, mismatch, corrected, dsat);
    end
    if (d == 0) n_exact++;
    if (d == 1 && err[K-1:0] != 0) n_corr_data++;
    if (d == 1 && err[K+R-1:K] != 0) n_corr_par++;
    if (d == 2) n_fault++;
    if (d == 2 && t_in == t_st) n_fault_same++;
    if (d >= 3) n_mismatch++;
    // slice-level view of the difference vector, as the first level sees it
    begin
      logic [K+R-1:0] dv = encode(t_in) ^ cw;
      int maxs = 0;
      for (int b = 0; b < K; b += 8) begin
        int c = $countones(8'(dv[K-1:0] >> b));
        if (c > maxs) maxs = c;
      end
      if ($countones(dv[K+R-1:K]) > maxs) maxs = $countones(dv[K+R-1:K]);
      if (maxs >= 4) n_l1_or++;
      if (maxs >= 2 && maxs < 4) n_w2++;
    end
  endtask

  function automatic logic [K+R-1:0] rand_err(int nbits);
    logic [K+R-1:0] e = '0;
    while ($countones(e) < nbits) e |= (K+R)'(1) << ($urandom % (K + R));
    return e;
  endfunction

  task automatic need(int n, string what);
    checks++;
    $display("%-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0] t, t2;
    // directed: exact, one error in each position, two errors on a match
    t = K'({$urandom, $urandom});
    trial(t, t, '0);
    for (int b = 0; b < K + R; b++) trial(t, t, (K+R)'(1) << b);
    for (int b = 0; b < K + R - 1; b++) trial(t, t, (K+R)'(3) << b);
    // directed: tags one bit apart, no stored error (distance >= 4)
    for (int b = 0; b < K; b++) trial(t ^ (K'(1) << b), t, '0);
    // random
    for (int n = 0; n < 20000; n++) begin
      t  = K'({$urandom, $urandom});
      t2 = t;
      case ($urandom % 4)
        0: ;
        1: t2 = t ^ (K'(1) << ($urandom % K));
        2: t2 = t ^ (K'(1) << ($urandom % K)) ^ (K'(1) << ($urandom % K));
        default: t2 = K'({$urandom, $urandom});
      endcase
      trial(t, t2, rand_err($urandom % 4));
    end
    need(n_exact,      "exact match (d=0)");
    need(n_corr_data,  "corrected match, error in data part");
    need(n_corr_par,   "corrected match, error in parity part");
    need(n_fault,      "fault (d=2)");
    need(n_fault_same, "fault on a matching tag, double error");
    need(n_mismatch,   "mismatch (d>=3)");
    need(n_l1_or,      "a first-level slice with >= 4 differences");
    need(n_w2,         "largest slice difference of 2 or 3 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
