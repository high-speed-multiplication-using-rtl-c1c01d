// tb_ut_quad_combine -- self-checking test of the three-adder combiner.
//
// Random 32-bit operands a and b are split into 16-bit halves. The testbench
// forms the four half products itself, feeds them to the combiner (default
// H = 16) and compares its output with the full 64-bit product a * b. It also
// counts how often the final adder carries from the low 2H bits of its sum into
// the top H bits, a path that must be exercised, and checks that the low 16
// bits of q0 pass straight through. A watchdog ends the run with a
// failure if it does not finish in time.
module tb_ut_quad_combine;

  int checks    = 0;
  int failures  = 0;
  int final_cys = 0;

  logic [31:0] q0, q1, q2, q3;
  logic [63:0] q;

  ut_quad_combine dut (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .q(q));

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    logic [63:0] exp;
    logic [32:0] right;
    logic [47:0] left;
    q0 = 32'(a[15:0])  * 32'(b[15:0]);
    q1 = 32'(a[31:16]) * 32'(b[15:0]);
    q2 = 32'(a[15:0])  * 32'(b[31:16]);
    q3 = 32'(a[31:16]) * 32'(b[31:16]);
    #1;
    exp   = 64'(a) * 64'(b);
    right = 33'(q1) + 33'(q0[31:16]);
    left  = {q3, 16'h0} + 48'(q2);
    if (33'(left[31:0]) + right >= 33'h1_0000_0000) final_cys++;
    checks++;
    if (q != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %0d * %0d: got %0d expected %0d", a, b, q, exp);
    end
    checks++;
    if (q[15:0] != q0[15:0]) begin
      failures++;
      if (failures <= 10) $display("FAIL low half of q0 not passed through");
    end
  endtask

  initial begin
    q0 = 0; q1 = 0; q2 = 0; q3 = 0;
    apply(32'd0, 32'd0);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    apply(32'd7755, 32'd9425);
    apply(32'hFFFF_0000, 32'hFFFF_FFFF);
    apply(32'h0000_FFFF, 32'hFFFF_FFFF);
    for (int n = 0; n < 20000; n++) apply($urandom, $urandom);
    checks++;
    if (final_cys == 0) begin
      failures++;
      $display("FAIL the final adder never carried into the top bits");
    end
    $display("final adder carries into the top bits: %0d", final_cys);
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
