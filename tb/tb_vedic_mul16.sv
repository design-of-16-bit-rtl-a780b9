// tb_vedic_mul16: self-check of the 16x16 combinational Vedic multiplier.
// Applies corner operands, the four operand pairs of the published
// simulation waveform (1*0, 2*1, 3*2, 4*3 giving 0, 2, 6, 0xC), and
// 200,000 random pairs, comparing c with the integer product a * b.
module tb_vedic_mul16;
  logic [15:0] a, b;
  logic [31:0] c;
  int checks = 0, failures = 0;

  vedic_mul16 dut (.a(a), .b(b), .c(c));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a = x; b = y;
    #1;
    exp = {16'b0, x} * {16'b0, y};
    checks++;
    if (c != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h exp %h", x, y, c, exp);
    end
  endtask

  initial begin
    // waveform vectors, with the products printed there
    a = 16'h0001; b = 16'h0000; #1; checks++; if (c != 32'h00000000) failures++;
    a = 16'h0002; b = 16'h0001; #1; checks++; if (c != 32'h00000002) failures++;
    a = 16'h0003; b = 16'h0002; #1; checks++; if (c != 32'h00000006) failures++;
    a = 16'h0004; b = 16'h0003; #1; checks++; if (c != 32'h0000000C) failures++;
    check(16'hffff, 16'hffff);
    check(16'hffff, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h00ff, 16'h00ff);
    check(16'hff00, 16'h00ff);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1 << i), 16'((1 << j) - 1));
    for (int i = 0; i < 200000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
