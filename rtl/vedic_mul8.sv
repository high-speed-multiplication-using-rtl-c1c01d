// vedic_mul8 -- 8x8 unsigned Vedic multiplier, 8x8 -> 16 bits.
//
// Splits each operand into a high and a low half of 4 bits and multiplies
// the halves crosswise and vertically with four 4x4 Vedic multipliers
// (urdhva_mul):
//   Q0 = a[3:0] * b[3:0]     Q1 = a[7:4] * b[3:0]
//   Q2 = a[3:0] * b[7:4]     Q3 = a[7:4] * b[7:4]
// All four run in parallel. ut_quad_combine then adds them with three adders
// into q = Q3*2^8 + (Q1 + Q2)*2^4 + Q0.
//
// Interface: a, b (8 bits, unsigned) -> q (16 bits) = a * b.
// Timing: purely combinational, no clock and no latency.
//
// Building the 8x8 level from four 4x4 blocks is this design's reading of the
// hierarchical scheme. The 4x4 blocks use the bit-level vertically-and-crosswise
// rule (urdhva_mul with N = 4).
module vedic_mul8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] q
);

  logic [7:0] q0, q1, q2, q3;  // the four 4x4 partial products

  urdhva_mul #(.N(4)) u_ll (.a(a[3:0]), .b(b[3:0]), .q(q0));
  urdhva_mul #(.N(4)) u_hl (.a(a[7:4]), .b(b[3:0]), .q(q1));
  urdhva_mul #(.N(4)) u_lh (.a(a[3:0]), .b(b[7:4]), .q(q2));
  urdhva_mul #(.N(4)) u_hh (.a(a[7:4]), .b(b[7:4]), .q(q3));

  ut_quad_combine #(.H(4)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .q (q)
  );

endmodule
