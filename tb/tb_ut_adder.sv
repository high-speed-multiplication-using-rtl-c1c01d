// tb_ut_adder -- self-checking test of the W-bit adder.
//
// The default 32-bit adder gets corner cases (zero, all ones plus one, which
// carries out) and random operands; an 8-bit copy is checked exhaustively.
// Sum and carry out are compared with a wider addition done in the testbench.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_ut_adder;

  int checks   = 0;
  int failures = 0;
  int carries  = 0;

  logic [31:0] x, y, s;
  logic        co;
  logic [7:0]  x8, y8, s8;
  logic        co8;

  ut_adder          dut   (.x(x),  .y(y),  .s(s),  .co(co));
  ut_adder #(.W(8)) dut8  (.x(x8), .y(y8), .s(s8), .co(co8));

  task automatic check32(input logic [31:0] xa, input logic [31:0] ya);
    logic [32:0] exp;
    x = xa; y = ya; #1;
    exp = {1'b0, xa} + {1'b0, ya};
    checks++;
    if ({co, s} != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %h + %h: got %h expected %h", xa, ya, {co, s}, exp);
    end
    if (exp[32]) carries++;
  endtask

  initial begin
    x = 0; y = 0; x8 = 0; y8 = 0;
    check32(32'h0, 32'h0);
    check32(32'hFFFF_FFFF, 32'h1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h7FFF_FFFF, 32'h0000_0001);
    for (int n = 0; n < 20000; n++) check32($urandom, $urandom);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = 8'(i); y8 = 8'(j); #1;
        checks++;
        if ({co8, s8} != 9'(i + j)) begin
          failures++;
          if (failures <= 10) $display("FAIL 8-bit %0d + %0d: got %0d", i, j, {co8, s8});
        end
      end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL the carry out never occurred");
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
