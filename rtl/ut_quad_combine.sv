// ut_quad_combine -- joins four half-width partial products into one product.
//
// A 2H x 2H multiplication is split into four H x H ones:
//   q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH   (each 2H bits)
// and the product is q3*2^(2H) + (q1 + q2)*2^H + q0. Three adders form it:
//   left  adder (3H bits): {q3, H zeros} + {H zeros, q2}
//   right adder (2H bits): q1 + {H zeros, q0[2H-1:H]}, its carry out kept as a
//                          (2H+1)-th bit
//   final adder (3H bits): left sum + right sum -> q[4H-1:H]
// The low half of q0 needs no addition and goes straight to q[H-1:0].
//
// The left and final adders can never carry out when q0..q3 are products of
// H-bit numbers, because a product of two 2H-bit numbers fits in 4H bits.
// Their carry outputs feed only an assertion that checks this rule.
//
// Interface: q0..q3 (2H bits each) -> q (4H bits). Combinational, no clock.
//
// The arrangement of the adders, their zero padding and the bypass of the low
// half of q0 follow the block diagram of the 32x32 multiplier (H = 16). Using
// the same arrangement at every lower level (H = 8, 4) is this design's choice.
module ut_quad_combine #(
  parameter int unsigned H = 16
) (
  input  logic [2*H-1:0] q0,  // low  x low
  input  logic [2*H-1:0] q1,  // high part of a x low part of b
  input  logic [2*H-1:0] q2,  // low part of a x high part of b
  input  logic [2*H-1:0] q3,  // high x high
  output logic [4*H-1:0] q
);

  logic [3*H-1:0] left_sum;
  logic           left_co;    // 0 for valid inputs, see above
  logic [2*H-1:0] right_sum;
  logic           right_co;
  logic [3*H-1:0] upper;
  logic           final_co;   // 0 for valid inputs, see above

  ut_adder #(.W(3*H)) u_left (
    .x ({q3, {H{1'b0}}}),
    .y ({{H{1'b0}}, q2}),
    .s (left_sum),
    .co(left_co)
  );

  ut_adder #(.W(2*H)) u_right (
    .x (q1),
    .y ({{H{1'b0}}, q0[2*H-1:H]}),
    .s (right_sum),
    .co(right_co)
  );

  ut_adder #(.W(3*H)) u_final (
    .x (left_sum),
    .y ({{(H-1){1'b0}}, right_co, right_sum}),
    .s (upper),
    .co(final_co)
  );

  assign q = {upper, q0[H-1:0]};

  // Partial products of H-bit halves never make the 3H-bit adders overflow.
  always_comb begin
    assert final (!left_co && !final_co)
      else $error("ut_quad_combine: partial products overflow the %0d-bit adders", 3*H);
  end

endmodule
