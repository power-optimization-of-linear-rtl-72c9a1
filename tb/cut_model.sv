// cut_model -- small combinational stand-in for a circuit under test, used
// only by the testbenches: 8 inputs, 8 outputs (a 4-bit adder of the two
// input nibbles and four single gates). fault_en forces output bit 0 to
// 0, a stuck-at-0 fault for checking that the self-test catches it.
module cut_model (
  input  logic [7:0] a,
  input  logic       fault_en,
  output logic [7:0] y
);
  always_comb begin
    y[3:0] = a[3:0] + a[7:4];
    y[4]   = ~(a[4] ^ a[3]);
    y[5]   = a[5] | a[2];
    y[6]   = a[6] & a[1];
    y[7]   = a[7] ^ a[0];
    if (fault_en) y[0] = 1'b0;
  end
endmodule
