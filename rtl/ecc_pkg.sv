// ecc_pkg: constants and the code definition shared by the ECC tag matcher.
//
// The matcher works on a systematic single-error-correcting, double-error-
// detecting code. The default size is the (40,33) code: 33 data (tag) bits and
// 7 parity bits. The code itself is this design's choice: a Hsiao odd-weight-
// column code. Column j of the parity part of the parity-check matrix is the
// j-th R-bit vector of odd weight >= 3, taken in order of increasing weight and,
// within one weight, increasing value. Parity bit i is then the XOR of every
// data bit j whose column has bit i set. All columns are distinct and of odd
// weight, so the code has minimum distance 4.
//
// The four distance ranges used by the decision logic are also defined here.
package ecc_pkg;

  localparam int unsigned K_DEF = 33;  // data bits of the (40,33) code
  localparam int unsigned R_DEF = 7;   // parity bits of the (40,33) code

  // Outcome of one comparison, by Hamming distance d between the encoded
  // incoming tag and the stored code word.
  typedef enum logic [1:0] {
    RANGE_EXACT    = 2'd0,  // d == 0
    RANGE_CORRECT  = 2'd1,  // 0 < d <= tmax: match once the error is corrected
    RANGE_FAULT    = 2'd2,  // tmax < d <= rmax: stored word is uncorrectable
    RANGE_MISMATCH = 2'd3   // d > rmax: a different tag
  } dist_range_e;

  // Parity-check columns of the data bits, one R-bit column per data bit,
  // packed as cols[j*R +: R]. Returns 0 for columns that cannot be formed
  // (more data bits than odd-weight columns).
  function automatic logic [1023:0] hsiao_columns(int unsigned k, int unsigned r);
    logic [1023:0] cols;
    int unsigned   j;
    cols = '0;
    j    = 0;
    for (int unsigned w = 3; w <= r; w += 2) begin
      for (int unsigned v = 0; v < (1 << r); v++) begin
        if ($countones(v) == w && j < k) begin
          for (int unsigned b = 0; b < r; b++) cols[j*r + b] = v[b];
          j++;
        end
      end
    end
    return cols;
  endfunction

  // Number of weight-3-and-up odd columns available for r parity bits.
  function automatic int unsigned hsiao_capacity(int unsigned r);
    int unsigned n;
    n = 0;
    for (int unsigned v = 0; v < (1 << r); v++)
      if ($countones(v) >= 3 && $countones(v) % 2 == 1) n++;
    return n;
  endfunction

endpackage
