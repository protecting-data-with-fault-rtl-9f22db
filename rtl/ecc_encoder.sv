// ecc_encoder: systematic encoder of the incoming tag.
//
// Computes the R parity bits of a K-bit data word. Parity bit i is the XOR of
// the data bits whose parity-check column (ecc_pkg::hsiao_columns) has bit i
// set; each parity bit is one XOR tree, purely combinational. In the matcher it
// runs in parallel with the comparison of the data part, which needs no
// encoding, so only the parity comparison waits for it.
//
// The default (40,33) size follows the published architecture; the particular code (a Hsiao
// SEC-DED code) is this design's choice, since the published architecture does not fix one.
// Needs K * R <= 1024 and K <= number of odd-weight columns of weight >= 3.
module ecc_encoder
  import ecc_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  parameter int unsigned R = R_DEF
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] parity_o
);

  localparam logic [1023:0] COLS = hsiao_columns(K, R);

  initial begin
    assert (K * R <= 1024 && K <= hsiao_capacity(R))
      else $error("ecc_encoder: %0d data bits do not fit a Hsiao code with %0d parity bits", K, R);
  end

  always_comb begin
    parity_o = '0;
    for (int unsigned j = 0; j < K; j++)
      for (int unsigned i = 0; i < R; i++)
        if (COLS[j*R + i]) parity_o[i] = parity_o[i] ^ data_i[j];
  end

endmodule
