// approx_addsub: low-cost approximate adder/subtractor for sign-magnitude data.
//
// Operands a_i and b_i are W-bit sign-magnitude words (sign in bit W-1).
// With sub_i high the sign of b_i is flipped first, so the unit computes
// a - b; otherwise a + b. The rule is:
//   * equal signs: the magnitudes are added and the result takes the sign
//     of a_i. This is exact.
//   * different signs: both operands go through the one's-complement
//     converter, the core adder adds the two W-bit words, and the carry out
//     of the top bit (the "rotated" or end-around carry of a one's-complement
//     adder) is simply dropped instead of being added back in. The W-bit
//     one's-complement result is converted back to sign-magnitude.
// Dropping the rotated carry removes the carry adder and its ripple from the
// path. The price is an error of exactly one LSB whenever the signs differ
// and the true result is positive (the carry would have been 1); results
// that are negative or zero are exact. A true zero with different signs comes
// out as negative zero (sign 1, magnitude 0).
//
// Output y_o is W+1 bits: sign in bit W and a W-bit magnitude, wide enough
// that an equal-sign sum never overflows. carry_drop_o is high when a
// rotated carry was neglected, that is when y_o is one LSB below the exact
// result. The unit is combinational; in the filter it forms one processing
// layer between two register layers.
//
// The equal-sign/different-sign split, the dropped carry and the
// one's-complement conversions follow the method described for this unit;
// the subtract input, the output width and the carry_drop_o flag are this
// design's own choices.
module approx_addsub #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  input  logic         sub_i,
  output logic [W:0]   y_o,
  output logic         carry_drop_o
);
  logic [W-1:0] b_eff;      // b with the subtract applied to its sign
  logic [W-1:0] a_oc, b_oc; // one's-complement forms
  logic         same_sign;
  logic [W-1:0] op_a, op_b; // core adder operands
  logic [W:0]   core_sum;   // core adder result, bit W is the carry out
  logic [W-1:0] r_sm;       // different-sign result back in sign-magnitude

  assign b_eff = {b_i[W-1] ^ sub_i, b_i[W-2:0]};

  sm_ones_comp #(.W(W)) u_conv_a (.d_i(a_i),   .q_o(a_oc));
  sm_ones_comp #(.W(W)) u_conv_b (.d_i(b_eff), .q_o(b_oc));

  assign same_sign = (a_i[W-1] == b_eff[W-1]);

  // One core adder serves both cases: the plain magnitudes when the signs
  // agree, the one's-complement words when they differ.
  always_comb begin
    if (same_sign) begin
      op_a = {1'b0, a_i[W-2:0]};
      op_b = {1'b0, b_eff[W-2:0]};
    end else begin
      op_a = a_oc;
      op_b = b_oc;
    end
  end

  assign core_sum = {1'b0, op_a} + {1'b0, op_b};

  // Output conversion of the one's-complement word; core_sum[W] is ignored.
  sm_ones_comp #(.W(W)) u_conv_y (.d_i(core_sum[W-1:0]), .q_o(r_sm));

  always_comb begin
    if (same_sign) begin
      y_o          = {a_i[W-1], core_sum[W-1:0]};
      carry_drop_o = 1'b0;
    end else begin
      y_o          = {r_sm[W-1], 1'b0, r_sm[W-2:0]};
      carry_drop_o = core_sum[W];
    end
  end
endmodule
