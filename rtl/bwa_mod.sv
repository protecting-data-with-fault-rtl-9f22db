// bwa_mod: butterfly-formed weight accumulator, modified form.
//
// The matcher does not need the exact Hamming distance, only which of four
// ranges it falls in (0, 1, 2, 3 or more), so this accumulator only counts up
// to weight 2 exactly. It has the butterfly of bwa (stage s pairs position i
// with i + 2^s), but keeps only the half adders whose inputs have weight 1 or
// 2. The weight-4 carry of a weight-2 adder is not accumulated further: all of
// them go to one OR-gate tree, and the adders that would have summed them are
// left out. Outputs:
//   w1_o       the weight-1 bit (position 0),
//   w2_o[s]    the weight-2 bit at position 2^s, s = 0..L-1,
//   or_o       1 when a weight-4 carry was produced.
// If or_o is 0 the input count is exactly w1_o + 2*popcount(w2_o); if it is 1
// the count is 4 or more. Combinational. The published architecture describes the split into
// weight bits and an OR-gate tree; the cut at weight 4 is this design's choice,
// made for a code that corrects one error and detects two.
module bwa_mod #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                       in_i,
  output logic                               w1_o,
  output logic [((N <= 2) ? 1 : $clog2(N))-1:0] w2_o,
  output logic                               or_o
);

  localparam int unsigned L = (N <= 2) ? 1 : $clog2(N);
  localparam int unsigned P = 1 << L;

  wire [L:0][P-1:0] v;      // v[s] enters stage s
  wire [L*P-1:0]    ge4;    // weight-4 carries, index s*P + i

  for (genvar p = 0; p < P; p++) begin : g_pad
    if (p < N) begin : g_in
      assign v[0][p] = in_i[p];
    end else begin : g_zero
      assign v[0][p] = 1'b0;
    end
  end

  for (genvar s = 0; s < L; s++) begin : g_stage
    for (genvar i = 0; i < P; i++) begin : g_pos
      // Weight of position i entering stage s is 2^popcount(i mod 2^s).
      localparam int unsigned WB = $countones(i & ((1 << s) - 1));
      if ((i & (1 << s)) == 0) begin : g_pair
        if (WB == 0) begin : g_w1
          half_adder u_ha (
            .a (v[s][i]),
            .b (v[s][i + (1 << s)]),
            .s (v[s+1][i]),
            .c (v[s+1][i + (1 << s)])
          );
          assign ge4[s*P + i]            = 1'b0;
          assign ge4[s*P + i + (1 << s)] = 1'b0;
        end else if (WB == 1) begin : g_w2
          half_adder u_ha (
            .a (v[s][i]),
            .b (v[s][i + (1 << s)]),
            .s (v[s+1][i]),
            .c (ge4[s*P + i])
          );
          assign v[s+1][i + (1 << s)]    = 1'b0;
          assign ge4[s*P + i + (1 << s)] = 1'b0;
        end else begin : g_cut
          // Weight 4 and up: already reported through the OR-gate tree.
          assign v[s+1][i]               = 1'b0;
          assign v[s+1][i + (1 << s)]    = 1'b0;
          assign ge4[s*P + i]            = 1'b0;
          assign ge4[s*P + i + (1 << s)] = 1'b0;
        end
      end
    end
  end

  or_tree #(.N(L*P)) u_or (
    .in_i (ge4),
    .or_o (or_o)
  );

  assign w1_o = v[L][0];
  for (genvar s = 0; s < L; s++) begin : g_w2out
    assign w2_o[s] = v[L][1 << s];
  end

endmodule
