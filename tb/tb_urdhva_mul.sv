// tb_urdhva_mul -- self-checking test of the bit-level vertically-and-crosswise
// multiplier.
//
// Three copies are tested: the default N = 4 (the 4x4 block, including the
// worked example 9 x 6 = 54), N = 3 (the 3x3 case whose five column steps the
// method spells out) and N = 8. Every operand pair is applied, exhaustively,
// and each product is compared with the simulator's own '*'. The design is
// combinational, so each vector is held for 1 time unit before it is checked.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_urdhva_mul;

  int checks   = 0;
  int failures = 0;

  logic [3:0]  a4, b4;
  logic [7:0]  q4;
  logic [2:0]  a3, b3;
  logic [5:0]  q3;
  logic [7:0]  a8, b8;
  logic [15:0] q8;

  urdhva_mul          dut4 (.a(a4), .b(b4), .q(q4));
  urdhva_mul #(.N(3)) dut3 (.a(a3), .b(b3), .q(q3));
  urdhva_mul #(.N(8)) dut8 (.a(a8), .b(b8), .q(q8));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    a4 = 0; b4 = 0; a3 = 0; b3 = 0; a8 = 0; b8 = 0;
    // Worked example of the 4x4 block: a = 9, b = 6 -> 54.
    a4 = 4'd9; b4 = 4'd6; #1;
    check("4x4 9*6", q4, 54);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check("4x4", q4, i * j);
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j); #1;
        check("3x3", q3, i * j);
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check("8x8", q8, i * j);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
