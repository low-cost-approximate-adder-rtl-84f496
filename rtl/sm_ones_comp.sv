// sm_ones_comp: the "1'C" conversion circuit between sign-magnitude and
// one's-complement form.
//
// A negative number has its magnitude bits inverted and its sign bit kept;
// a positive number passes unchanged. The mapping is its own inverse, so the
// same circuit turns a sign-magnitude word into one's complement (in front
// of the core adder) and a one's-complement sum back into sign-magnitude
// (behind it). Purely combinational: one row of XOR gates, controlled by
// the sign bit.
//
// Interface: d_i is a W-bit word, sign in bit W-1; q_o is the converted word.
// Width W is a free parameter; 16 matches the data bus used for the filter.
module sm_ones_comp #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] d_i,
  output logic [W-1:0] q_o
);
  always_comb begin
    q_o[W-1]   = d_i[W-1];
    q_o[W-2:0] = d_i[W-2:0] ^ {(W-1){d_i[W-1]}};
  end
endmodule
