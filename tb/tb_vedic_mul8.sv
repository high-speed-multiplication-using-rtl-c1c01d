// tb_vedic_mul8 -- exhaustive self-checking test of the 8x8 Vedic multiplier.
//
// Applies the worked example 30 x 50 = 1500 and then all 65,536 operand pairs,
// comparing each product with the simulator's '*'. Combinational design: each
// vector is held for 1 time unit. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_vedic_mul8;

  int checks   = 0;
  int failures = 0;

  logic [7:0]  a, b;
  logic [15:0] q;

  vedic_mul8 dut (.a(a), .b(b), .q(q));

  initial begin
    a = 8'd30; b = 8'd50; #1;
    checks++;
    if (q != 16'd1500) begin
      failures++;
      $display("FAIL 30*50: got %0d", q);
    end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (q != 16'(i * j)) begin
          failures++;
          if (failures <= 10) $display("FAIL %0d*%0d: got %0d", i, j, q);
        end
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
