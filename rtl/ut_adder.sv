// ut_adder -- W-bit unsigned binary adder with carry out.
//
// One of the "Adder" boxes that join the partial products of the Vedic
// multiplier hierarchy. The operands arrive already aligned (zero padded or
// shifted by the caller), so the adder itself is a plain carry-propagate add.
//
// Interface: x, y (W bits) -> s (W bits) and co (carry out), {co, s} = x + y.
// Timing: purely combinational.
//
// The block's existence and place follow the multiplier's block diagram; its
// internal structure is this design's own choice (the generic '+', which a
// synthesis tool maps to the target's fast carry logic).
module ut_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s,
  output logic         co
);

  always_comb {co, s} = {1'b0, x} + {1'b0, y};

endmodule
