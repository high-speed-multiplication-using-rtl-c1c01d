// vedic_mul32 -- 32x32 unsigned Vedic multiplier, 32x32 -> 64 bits.
//
// Splits each operand into a high and a low half of 16 bits and multiplies
// the halves crosswise and vertically with four 16x16 Vedic multipliers
// (vedic_mul16):
//   Q0 = a[15:0] * b[15:0]     Q1 = a[31:16] * b[15:0]
//   Q2 = a[15:0] * b[31:16]     Q3 = a[31:16] * b[31:16]
// All four run in parallel. ut_quad_combine then adds them with three adders
// into q = Q3*2^32 + (Q1 + Q2)*2^16 + Q0.
//
// Interface: a, b (32 bits, unsigned) -> q (64 bits) = a * b.
// Timing: purely combinational, no clock and no latency.
//
// The split into four 16x16 multiply blocks and the three adders follow the
// block diagram of the 32x32 multiplier exactly. This is the top of the design.
module vedic_mul32 (
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  output logic [63:0] q
);

  logic [31:0] q0, q1, q2, q3;  // the four 16x16 partial products

  vedic_mul16 u_ll (.a(a[15:0]), .b(b[15:0]), .q(q0));
  vedic_mul16 u_hl (.a(a[31:16]), .b(b[15:0]), .q(q1));
  vedic_mul16 u_lh (.a(a[15:0]), .b(b[31:16]), .q(q2));
  vedic_mul16 u_hh (.a(a[31:16]), .b(b[31:16]), .q(q3));

  ut_quad_combine #(.H(16)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .q (q)
  );

endmodule
