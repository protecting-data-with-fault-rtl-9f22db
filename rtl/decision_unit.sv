// decision_unit: classifies the Hamming distance into the four ranges.
//
// Inputs are the second-level results of the matcher:
//   or_i   the second-level OR-gate tree: some first-level accumulator saw a
//          distance of 4 or more in its slice,
//   s1_i   the outputs of the general accumulator (bwa) that counted all
//          weight-1 bits of the first level; bit p has weight 2^popcount(p),
//   s2_i   the outputs of the accumulator that counted all weight-2 bits;
//          bit p stands for 2 * 2^popcount(p).
// The unit forms the distance d saturated at 4 (dist_sat = 4 means "4 or more")
// and compares it with TMAX (errors the code corrects) and RMAX (errors it
// detects):
//   d == 0             match,    exact
//   0 < d <= TMAX      match,    corrected = 1
//   TMAX < d <= RMAX   fault     (stored word holds an uncorrectable error)
//   d > RMAX           mismatch
// Exactly one of match, fault and mismatch is 1. Combinational: the published architecture
// describes the unit as combinational logic given by a truth table; the four
// ranges above and the saturation at 4 are this design's reading of it.
module decision_unit
  import ecc_pkg::*;
#(
  parameter int unsigned P1   = 8,
  parameter int unsigned P2   = 32,
  parameter int unsigned TMAX = 1,
  parameter int unsigned RMAX = 2
) (
  input  logic          or_i,
  input  logic [P1-1:0] s1_i,
  input  logic [P2-1:0] s2_i,
  output logic          match,
  output logic          fault,
  output logic          mismatch,
  output logic          corrected,
  output logic [2:0]    dist_sat,
  output dist_range_e   range_o
);

  initial begin
    assert (TMAX <= RMAX && RMAX < 4)
      else $error("decision_unit: needs TMAX <= RMAX < 4");
  end

  logic       big;   // distance is 4 or more
  logic [2:0] d;     // exact distance when big is 0 (0..7 before saturation)

  always_comb begin
    big = or_i;
    d   = {2'b00, s1_i[0]};
    for (int unsigned p = 1; p < P1; p++) begin
      if ($countones(p) == 1) d = d + 3'd2 * {2'b00, s1_i[p]};
      else                    big = big | s1_i[p];
    end
    d = d + 3'd2 * {2'b00, s2_i[0]};
    for (int unsigned p = 1; p < P2; p++) big = big | s2_i[p];
    dist_sat = (big || d >= 3'd4) ? 3'd4 : d;
  end

  always_comb begin
    if (dist_sat == 3'd0)                  range_o = RANGE_EXACT;
    else if (32'(dist_sat) <= TMAX)        range_o = RANGE_CORRECT;
    else if (32'(dist_sat) <= RMAX)        range_o = RANGE_FAULT;
    else                                   range_o = RANGE_MISMATCH;
    match     = (range_o == RANGE_EXACT) || (range_o == RANGE_CORRECT);
    corrected = (range_o == RANGE_CORRECT);
    fault     = (range_o == RANGE_FAULT);
    mismatch  = (range_o == RANGE_MISMATCH);
  end

endmodule
