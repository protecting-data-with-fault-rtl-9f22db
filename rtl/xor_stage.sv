// xor_stage: bitwise difference of two words.
//
// diff_o = a_i ^ b_i, combinational. A 1 in diff_o marks a bit where the two
// words differ, so the weight of diff_o is their Hamming distance. The matcher
// uses one stage for the data part (incoming tag against stored data) and one
// for the parity part (parity of the incoming tag against stored parity), as
// the published architecture describes. The width is a parameter.
module xor_stage #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] diff_o
);

  always_comb diff_o = a_i ^ b_i;

endmodule
