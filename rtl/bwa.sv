// bwa: butterfly-formed weight accumulator, general form.
//
// Counts the 1's among N input bits without carry-propagate adders. The input
// is padded with zeros to P = 2^L bits and passes through L stages of P/2 half
// adders. Stage s pairs position i with position i + 2^s (bit s of i clear):
// the sum stays at i and the carry moves to i + 2^s. Both members of every pair
// carry the same weight, so sum bits and carry bits of one stage are
// accumulated separately in the next, which is the butterfly connection the
// published architecture describes. After the last stage output bit p has weight
// 2^popcount(p), and when it is 1 the number of 1's among the inputs that
// reach it equals that weight. The input count is
//     sum over p of w_o[p] * 2^popcount(p).
// Combinational, depth L half adders. The butterfly pairing order and the
// zero padding are this design's choices.
module bwa #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                             in_i,
  output logic [(1 << ((N <= 1) ? 0 : $clog2(N)))-1:0] w_o
);

  localparam int unsigned L = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned P = 1 << L;

  // v[s] is the vector entering stage s; v[L] is the result.
  wire [L:0][P-1:0] v;

  for (genvar p = 0; p < P; p++) begin : g_pad
    if (p < N) begin : g_in
      assign v[0][p] = in_i[p];
    end else begin : g_zero
      assign v[0][p] = 1'b0;
    end
  end

  for (genvar s = 0; s < L; s++) begin : g_stage
    for (genvar i = 0; i < P; i++) begin : g_pos
      if ((i & (1 << s)) == 0) begin : g_ha
        half_adder u_ha (
          .a (v[s][i]),
          .b (v[s][i + (1 << s)]),
          .s (v[s+1][i]),
          .c (v[s+1][i + (1 << s)])
        );
      end
    end
  end

  assign w_o = v[L];

endmodule
