// tb_vedic_mul32 -- end-to-end self-checking test of the 32x32 Vedic multiplier
// at its full size.
//
// Applies the worked example 7755 x 9425 = 73090875, corner operands and
// 200,000 random pairs (plus pairs with many ones, which stress the carries),
// and compares every 64-bit product with the simulator's '*'. It also counts,
// from the operands alone, how often each carry path of the design is used,
// and fails if one never is:
//   - a column of a 4x4 block whose carry is 2 or more (column sum >= 4),
//   - the final adder of the 16x16 level carrying into its top 8 bits,
//   - the final adder of the 32x32 level carrying into its top 16 bits,
//   - the left adder of the 32x32 level carrying into the Q3 field,
//   - the low 16 bits of Q0 passing straight to the product (non-zero).
// Combinational design: each vector is held for 1 time unit. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_vedic_mul32;

  int checks   = 0;
  int failures = 0;

  int ev_col_carry2 = 0;
  int ev_final_cy16 = 0;
  int ev_final_cy32 = 0;
  int ev_left_cy32  = 0;
  int ev_bypass     = 0;

  logic [31:0] a, b;
  logic [63:0] q;

  vedic_mul32 dut (.a(a), .b(b), .q(q));

  // Carry of 2 or more in some column of the 4x4 block a[3:0] x b[3:0].
  function automatic bit col_carry2(input logic [3:0] x, input logic [3:0] y);
    for (int k = 0; k < 7; k++) begin
      int s = 0;
      for (int i = 0; i < 4; i++)
        if (k - i >= 0 && k - i < 4) s += int'(x[i] & y[k-i]);
      if (s >= 4) return 1'b1;
    end
    return 1'b0;
  endfunction

  // For operands of 2h bits split into h-bit halves: does the final adder,
  // left sum + right sum, carry out of the low 2h bits of the left sum?
  function automatic bit final_cy(input longint unsigned x, input longint unsigned y, input int h);
    longint unsigned m  = (64'd1 << h) - 1;
    longint unsigned m2 = (64'd1 << (2 * h)) - 1;
    longint unsigned q0 = (x & m) * (y & m);
    longint unsigned q1 = (x >> h) * (y & m);
    longint unsigned q2 = (x & m) * (y >> h);
    longint unsigned q3 = (x >> h) * (y >> h);
    longint unsigned left  = (q3 << h) + q2;
    longint unsigned right = q1 + (q0 >> h);
    return (((left & m2) + right) >> (2 * h)) != 0;
  endfunction

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    logic [31:0] q2, q3;
    a = x; b = y; #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (q != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d*%0d: got %0d expected %0d", x, y, q, exp);
    end
    q2 = 32'(x[15:0])  * 32'(y[31:16]);
    q3 = 32'(x[31:16]) * 32'(y[31:16]);
    if (col_carry2(x[3:0], y[3:0]))                 ev_col_carry2++;
    if (final_cy(64'(x[15:0]), 64'(y[15:0]), 8))    ev_final_cy16++;
    if (final_cy(64'(x), 64'(y), 16))               ev_final_cy32++;
    if (17'(q3[15:0]) + 17'(q2[31:16]) >= 17'h10000) ev_left_cy32++;
    if (x[15:0] != 0 && y[15:0] != 0 && (32'(x[15:0]) * 32'(y[15:0])) % 65536 != 0) ev_bypass++;
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    a = 0; b = 0;
    apply(32'd7755, 32'd9425);
    checks++;
    if (q != 64'd73090875) begin
      failures++;
      $display("FAIL 7755*9425: got %0d", q);
    end
    apply(32'd0, 32'd0);
    apply(32'd0, 32'hFFFF_FFFF);
    apply(32'd1, 32'hFFFF_FFFF);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h0000_FFFF, 32'hFFFF_0000);
    for (int n = 0; n < 200000; n++) apply($urandom, $urandom);
    // Operands with many ones make long carries in every adder.
    for (int n = 0; n < 20000; n++) apply($urandom | $urandom | $urandom, $urandom | $urandom);
    need("4x4 column carry of 2 or more", ev_col_carry2);
    need("16x16 final adder carry into top bits", ev_final_cy16);
    need("32x32 final adder carry into top bits", ev_final_cy32);
    need("32x32 left adder carry into Q3", ev_left_cy32);
    need("low half of Q0 bypassing the adders", ev_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
