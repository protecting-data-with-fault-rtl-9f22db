// or_tree: balanced tree of 2-input OR gates.
//
// Reduces N bits to their OR. The input is padded with zeros to the next power
// of two and reduced in log2 levels of 2-input ORs, so the depth is
// ceil(log2(N)) gates. Combinational. The published architecture names the OR-gate trees of
// the modified accumulators and of the second level; the balanced shape is
// this design's choice.
module or_tree #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] in_i,
  output logic         or_o
);

  localparam int unsigned L = (N <= 1) ? 0 : $clog2(N);
  localparam int unsigned P = 1 << L;

  // lvl[l] holds P >> l nodes; lvl[0] is the padded input.
  logic [P-1:0] lvl [L+1];

  always_comb begin
    lvl[0] = '0;
    lvl[0][N-1:0] = in_i;
    for (int unsigned l = 1; l <= L; l++) begin
      lvl[l] = '0;
      for (int unsigned i = 0; i < (P >> l); i++)
        lvl[l][i] = lvl[l-1][2*i] | lvl[l-1][2*i+1];
    end
  end

  assign or_o = lvl[L][0];

endmodule
