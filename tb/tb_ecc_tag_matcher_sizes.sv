// tb_ecc_tag_matcher_sizes: the matcher at sizes other than the default:
// the (40,33) code with first-level slices of 4 and of 16 bits, and a (32,26)
// Hsiao code with 8-bit slices. Each instance runs 5000 random trials with
// 0..3 injected errors (see matcher_harness) and must reach every distance
// 0..4.
module tb_ecc_tag_matcher_sizes;
  int   c [3], f [3];
  logic d [3];
  int   checks, failures;

  matcher_harness #(.K(33), .R(7), .BWA_IN(4))  h0 (.checks_o(c[0]), .failures_o(f[0]), .done_o(d[0]));
  matcher_harness #(.K(33), .R(7), .BWA_IN(16)) h1 (.checks_o(c[1]), .failures_o(f[1]), .done_o(d[1]));
  matcher_harness #(.K(26), .R(6), .BWA_IN(8))  h2 (.checks_o(c[2]), .failures_o(f[2]), .done_o(d[2]));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    wait (d[0] && d[1] && d[2]);
    checks   = c[0] + c[1] + c[2];
    failures = f[0] + f[1] + f[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
