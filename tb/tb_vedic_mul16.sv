// tb_vedic_mul16 -- self-checking test of the 16x16 Vedic multiplier.
//
// Applies the worked example 650 x 760 = 494000, corner operands (0, 1, all
// ones, single high bits) and 100,000 random pairs, comparing each product
// with the simulator's '*'. Combinational design: each vector is held for 1
// time unit. A watchdog ends the run with a failure if it does not finish.
module tb_vedic_mul16;

  int checks   = 0;
  int failures = 0;

  logic [15:0] a, b;
  logic [31:0] q;

  vedic_mul16 dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a = x; b = y; #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (q != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d*%0d: got %0d expected %0d", x, y, q, exp);
    end
  endtask

  initial begin
    a = 0; b = 0;
    apply(16'd650, 16'd760);
    checks++;
    if (q != 32'd494000) begin
      failures++;
      $display("FAIL 650*760: got %0d", q);
    end
    apply(16'd0, 16'hFFFF);
    apply(16'd1, 16'hFFFF);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'h8000, 16'h8000);
    apply(16'h00FF, 16'hFF00);
    for (int n = 0; n < 100000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
