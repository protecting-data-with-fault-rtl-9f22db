// half_adder: the counting cell of the weight accumulators.
//
// s = a ^ b keeps the weight of the inputs, c = a & b has twice that weight,
// so a + b = s + 2c. Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule
