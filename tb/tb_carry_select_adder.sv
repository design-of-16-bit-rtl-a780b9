// tb_carry_select_adder: self-check of the carry-select adder at its default
// 16-bit width with 4-bit sections, and of a 10-bit instance whose top
// section is only 2 bits wide. Corner operands (all zeros, all ones, long
// carry chains) and random operands with random carry in are compared with
// the integer sum a + b + cin. The number of cases in which a section's
// carry-1 result was the one selected is counted and must be non-zero.
module tb_carry_select_adder;
  localparam int W1 = 16;
  localparam int W2 = 10;

  logic [W1-1:0] a1, b1, s1;
  logic          ci1, co1;
  logic [W2-1:0] a2, b2, s2;
  logic          ci2, co2;
  int checks = 0, failures = 0;
  int sel_one = 0;

  carry_select_adder dut16 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));
  carry_select_adder #(.WIDTH(W2), .BLOCK(4)) dut10 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [W1-1:0] a, input logic [W1-1:0] b, input logic ci);
    logic [W1:0] exp;
    a1 = a; b1 = b; ci1 = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {{W1{1'b0}}, ci};
    checks++;
    // a carry into bit 4 means the second section took its carry-1 result
    if (((a[3:0] + b[3:0] + 5'(ci)) >> 4) != 0) sel_one++;
    if ({co1, s1} != exp) begin
      failures++;
      $display("FAIL16 a=%h b=%h ci=%0b got %h exp %h", a, b, ci, {co1, s1}, exp);
    end
  endtask

  task automatic check10(input logic [W2-1:0] a, input logic [W2-1:0] b, input logic ci);
    logic [W2:0] exp;
    a2 = a; b2 = b; ci2 = ci;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {{W2{1'b0}}, ci};
    checks++;
    if ({co2, s2} != exp) begin
      failures++;
      $display("FAIL10 a=%h b=%h ci=%0b got %h exp %h", a, b, ci, {co2, s2}, exp);
    end
  endtask

  initial begin
    check16('0, '0, 1'b0);
    check16('1, '0, 1'b1);
    check16('1, '1, 1'b1);
    check16(16'h7fff, 16'h0001, 1'b0);
    check16(16'h0fff, 16'h0000, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    check10('1, '1, 1'b1);
    check10('1, '0, 1'b1);
    for (int i = 0; i < 2048; i++)
      for (int ci = 0; ci < 2; ci++)
        check10(10'(i), 10'($urandom), 1'(ci));
    if (sel_one == 0) begin
      failures++;
      $display("FAIL carry-1 selection never exercised");
    end
    $display("carry-1 section selections: %0d", sel_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
