// tb_worked_examples -- runs the worked examples of the vertically-and-crosswise
// method on the multiplier of matching size, side by side.
//
//   4x4   (urdhva_mul, N = 4):  9 x 6       = 54
//   8x8   (vedic_mul8):         30 x 50     = 1500
//   16x16 (vedic_mul16):        650 x 760   = 494000
//   32x32 (vedic_mul32):        7755 x 9425 = 73090875
//   the decimal hand example 234 x 316 = 73944, applied in binary to the
//   16x16 and 32x32 multipliers.
// Expected products are the printed results, not values computed from the
// design. All four multipliers are combinational: the operands are held for
// 1 time unit before the products are read. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_worked_examples;

  int checks   = 0;
  int failures = 0;

  logic [3:0]  a4,  b4;
  logic [7:0]  q4;
  logic [7:0]  a8,  b8;
  logic [15:0] q8;
  logic [15:0] a16, b16;
  logic [31:0] q16;
  logic [31:0] a32, b32;
  logic [63:0] q32;

  urdhva_mul  u4  (.a(a4),  .b(b4),  .q(q4));
  vedic_mul8  u8  (.a(a8),  .b(b8),  .q(q8));
  vedic_mul16 u16 (.a(a16), .b(b16), .q(q16));
  vedic_mul32 u32 (.a(a32), .b(b32), .q(q32));

  task automatic check(input string what, input longint unsigned got, input longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end else begin
      $display("ok   %s = %0d", what, got);
    end
  endtask

  initial begin
    a4 = 4'd9;      b4 = 4'd6;
    a8 = 8'd30;     b8 = 8'd50;
    a16 = 16'd650;  b16 = 16'd760;
    a32 = 32'd7755; b32 = 32'd9425;
    #1;
    check("4x4   9 x 6",       q4,  54);
    check("8x8   30 x 50",     q8,  1500);
    check("16x16 650 x 760",   q16, 494000);
    check("32x32 7755 x 9425", q32, 73090875);
    a16 = 16'd234; b16 = 16'd316;
    a32 = 32'd234; b32 = 32'd316;
    #1;
    check("16x16 234 x 316",   q16, 73944);
    check("32x32 234 x 316",   q32, 73944);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
