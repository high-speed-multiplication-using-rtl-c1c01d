// vedic_mul16 -- 16x16 unsigned Vedic multiplier, 16x16 -> 32 bits.
//
// Splits each operand into a high and a low half of 8 bits and multiplies
// the halves crosswise and vertically with four 8x8 Vedic multipliers
// (vedic_mul8):
//   Q0 = a[7:0] * b[7:0]     Q1 = a[15:8] * b[7:0]
//   Q2 = a[7:0] * b[15:8]     Q3 = a[15:8] * b[15:8]
// All four run in parallel. ut_quad_combine then adds them with three adders
// into q = Q3*2^16 + (Q1 + Q2)*2^8 + Q0.
//
// Interface: a, b (16 bits, unsigned) -> q (32 bits) = a * b.
// Timing: purely combinational, no clock and no latency.
//
// Building the 16x16 level in the same way as the 32x32 level is this design's
// reading of the hierarchical scheme; the method names the 16x16 multiplier as
// the building block of the 32x32 one but draws only the top level.
module vedic_mul16 (
  input  logic [15:0]  a,
  input  logic [15:0]  b,
  output logic [31:0] q
);

  logic [15:0] q0, q1, q2, q3;  // the four 8x8 partial products

  vedic_mul8 u_ll (.a(a[7:0]), .b(b[7:0]), .q(q0));
  vedic_mul8 u_hl (.a(a[15:8]), .b(b[7:0]), .q(q1));
  vedic_mul8 u_lh (.a(a[7:0]), .b(b[15:8]), .q(q2));
  vedic_mul8 u_hh (.a(a[15:8]), .b(b[15:8]), .q(q3));

  ut_quad_combine #(.H(8)) u_combine (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3),
    .q (q)
  );

endmodule
