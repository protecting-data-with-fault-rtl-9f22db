// ecc_tag_matcher: compares an incoming tag with an ECC-protected stored tag
// without decoding the stored word.
//
// Instead of correcting the stored code word and then comparing, the matcher
// measures the Hamming distance between the stored word and the code word of
// the incoming tag, and decides from the distance alone. Because the code is
// systematic, the data part of the stored word is compared with the raw tag at
// once, while the encoder produces the parity of the tag; only the parity
// comparison waits for the encoder.
//
// Datapath (all combinational, no clock):
//   1. xor_stage on the data part and, after ecc_encoder, on the parity part:
//      the two difference vectors.
//   2. First level: the difference bits are cut into slices of BWA_IN bits
//      (data and parity slices kept apart, the last slice of each padded with
//      zeros) and each slice goes to a modified accumulator (bwa_mod), which
//      gives one weight-1 bit, log2(BWA_IN) weight-2 bits and an OR flag.
//   3. Second level: all OR flags go to an OR-gate tree, all weight-1 bits to
//      one general accumulator (bwa) and all weight-2 bits to another.
//   4. decision_unit: distance range -> match / fault / mismatch.
// Ports:
//   tag_in     incoming K-bit tag
//   cw_stored  stored code word, data in bits [K-1:0], parity in [K+R-1:K]
//   match      distance <= TMAX (corrected = 1 if it was not 0)
//   fault      TMAX < distance <= RMAX
//   mismatch   distance > RMAX
//   dist_sat   distance, saturated at 4
//   range_o    the four ranges as an enum
// The (40,33) size follows the published architecture; the choice of code, the 8-bit
// first-level slices, TMAX = 1, RMAX = 2 and the bit order of the stored word
// are this design's own.
module ecc_tag_matcher
  import ecc_pkg::*;
#(
  parameter int unsigned K      = K_DEF,
  parameter int unsigned R      = R_DEF,
  parameter int unsigned BWA_IN = 8,
  parameter int unsigned TMAX   = 1,
  parameter int unsigned RMAX   = 2
) (
  input  logic [K-1:0]   tag_in,
  input  logic [K+R-1:0] cw_stored,
  output logic           match,
  output logic           fault,
  output logic           mismatch,
  output logic           corrected,
  output logic [2:0]     dist_sat,
  output dist_range_e    range_o
);

  localparam int unsigned NB_D = (K + BWA_IN - 1) / BWA_IN;  // data slices
  localparam int unsigned NB_P = (R + BWA_IN - 1) / BWA_IN;  // parity slices
  localparam int unsigned NB   = NB_D + NB_P;
  localparam int unsigned LW   = (BWA_IN <= 2) ? 1 : $clog2(BWA_IN);  // weight-2 bits per slice
  localparam int unsigned N2   = NB * LW;
  localparam int unsigned P1   = 1 << ((NB <= 1) ? 0 : $clog2(NB));
  localparam int unsigned P2   = 1 << ((N2 <= 1) ? 0 : $clog2(N2));

  // ---- encoding in parallel with the data comparison ----------------------
  logic [R-1:0] parity_new;
  logic [K-1:0] diff_d;
  logic [R-1:0] diff_p;

  ecc_encoder #(.K(K), .R(R)) u_enc (
    .data_i   (tag_in),
    .parity_o (parity_new)
  );

  xor_stage #(.W(K)) u_xor_data (
    .a_i    (tag_in),
    .b_i    (cw_stored[K-1:0]),
    .diff_o (diff_d)
  );

  xor_stage #(.W(R)) u_xor_par (
    .a_i    (parity_new),
    .b_i    (cw_stored[K+R-1:K]),
    .diff_o (diff_p)
  );

  // ---- first level: modified accumulators, one per slice -------------------
  logic [NB*BWA_IN-1:0] slices;
  logic [NB-1:0]        l1_w1;
  logic [N2-1:0]        l1_w2;
  logic [NB-1:0]        l1_or;

  always_comb begin
    slices = '0;
    slices[K-1:0] = diff_d;
    slices[NB_D*BWA_IN +: R] = diff_p;
  end

  for (genvar b = 0; b < NB; b++) begin : g_l1
    bwa_mod #(.N(BWA_IN)) u_bwa (
      .in_i (slices[b*BWA_IN +: BWA_IN]),
      .w1_o (l1_w1[b]),
      .w2_o (l1_w2[b*LW +: LW]),
      .or_o (l1_or[b])
    );
  end

  // ---- second level: OR-gate tree and one accumulator per weight -----------
  logic          l2_or;
  logic [P1-1:0] l2_s1;
  logic [P2-1:0] l2_s2;

  or_tree #(.N(NB)) u_l2_or (
    .in_i (l1_or),
    .or_o (l2_or)
  );

  bwa #(.N(NB)) u_l2_w1 (
    .in_i (l1_w1),
    .w_o  (l2_s1)
  );

  bwa #(.N(N2)) u_l2_w2 (
    .in_i (l1_w2),
    .w_o  (l2_s2)
  );

  // ---- decision -------------------------------------------------------------
  decision_unit #(.P1(P1), .P2(P2), .TMAX(TMAX), .RMAX(RMAX)) u_dec (
    .or_i      (l2_or),
    .s1_i      (l2_s1),
    .s2_i      (l2_s2),
    .match     (match),
    .fault     (fault),
    .mismatch  (mismatch),
    .corrected (corrected),
    .dist_sat  (dist_sat),
    .range_o   (range_o)
  );

  // Exactly one verdict at a time.
  always_comb begin
    assert ($onehot({match, fault, mismatch}))
      else $error("ecc_tag_matcher: verdicts not one-hot");
  end

endmodule
