// matcher_harness: drives one ecc_tag_matcher of a given size with random tags
// and injected errors and compares each verdict with the popcount of the
// reference difference vector. Used by tb_ecc_tag_matcher_sizes to cover slice
// widths and code sizes other than the defaults. Reports its counts through
// ports once done_o rises.
module matcher_harness
  import ecc_ref_pkg::*;
#(
  parameter int K      = 33,
  parameter int R      = 7,
  parameter int BWA_IN = 8,
  parameter int TRIALS = 5000
) (
  output int   checks_o,
  output int   failures_o,
  output logic done_o
);
  logic [K-1:0]   tag;
  logic [K+R-1:0] cw;
  logic           match, fault, mismatch, corrected;
  logic [2:0]     dsat;
  ecc_pkg::dist_range_e rng;
  int seen [5];

  ecc_tag_matcher #(.K(K), .R(R), .BWA_IN(BWA_IN)) dut (
    .tag_in(tag), .cw_stored(cw), .match(match), .fault(fault),
    .mismatch(mismatch), .corrected(corrected), .dist_sat(dsat), .range_o(rng));

  function automatic logic [K+R-1:0] encode(logic [K-1:0] t);
    return {R'(ref_parity(64'(t), K, R)), t};
  endfunction

  initial begin
    logic [K-1:0]   t, t2;
    logic [K+R-1:0] e;
    int             d, nerr;
    checks_o = 0; failures_o = 0; done_o = 1'b0;
    for (int n = 0; n < TRIALS; n++) begin
      t  = K'({$urandom, $urandom});
      t2 = (n % 3 == 0) ? t : t ^ (K'(1) << ($urandom % K));
      if (n % 7 == 0) t2 = K'({$urandom, $urandom});
      e = '0;
      nerr = $urandom % 4;
      while ($countones(e) < nerr) e |= (K+R)'(1) << ($urandom % (K + R));
      tag = t;
      cw  = encode(t2) ^ e;
      #1;
      d = $countones(encode(t) ^ cw);
      seen[(d > 4) ? 4 : d]++;
      checks_o++;
      if (match != (d <= 1) || corrected != (d == 1) || fault != (d == 2)
          || mismatch != (d >= 3) || int'(dsat) != ((d > 4) ? 4 : d)
        || int'(rng) != ((d >= 3) ? 3 : d)) begin
        failures_o++;
        $display("FAIL K=%0d R=%0d BWA_IN=%0d d=%0d: m=%0d c=%0d f=%0d mm=%0d dsat=%0d",
                 K, R, BWA_IN, d, match, corrected, fault, mismatch, dsat);
      end
    end
    for (int i = 0; i < 5; i++) begin
      checks_o++;
      if (seen[i] == 0) begin
        failures_o++;
        $display("FAIL K=%0d BWA_IN=%0d: distance %0d never reached", K, BWA_IN, i);
      end
    end
    done_o = 1'b1;
  end
endmodule
