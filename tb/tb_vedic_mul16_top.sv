// tb_vedic_mul16_top: end-to-end self-check of the clocked 16-bit Vedic
// multiplier at its default (and only) configuration.
//
// A new operand pair is applied every clock cycle, just after the rising
// edge. The testbench checks that
//   * one cycle later out equals the integer product of that pair (latency
//     of exactly one cycle, one product per cycle);
//   * while the operands change in the middle of a cycle, out still holds
//     the previous product (it is registered, not combinational);
//   * the four operand pairs of the published waveform give 0, 2, 6, 0xC.
// It also counts how often the mechanisms of the datapath were exercised:
// a carry out of the crosswise sum, a carry out of the middle adder stage,
// and a carry-1 selection in the first-stage carry-select adder. Each must
// occur at least once. A watchdog ends the run after a fixed cycle count.
module tb_vedic_mul16_top;
  localparam int NRAND = 20000;

  logic        clk = 1'b0;
  logic [15:0] a, b;
  logic [31:0] out;
  int checks = 0, failures = 0, cycles = 0;
  int cross_carries = 0, mid_carries = 0, csa_selects = 0, holds = 0;

  vedic_mul16_top dut (.clk(clk), .a(a), .b(b), .out(out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count the datapath events while the operands are stable
  always @(negedge clk) begin
    if (dut.u_mul.u_comb.cross_c) cross_carries++;
    if (dut.u_mul.u_comb.mid_c) mid_carries++;
    if (dut.u_mul.u_comb.u_csa_cross.c[1]) csa_selects++;
  end

  // Apply one pair, check the product one edge later, and check in between
  // that a mid-cycle change of the operands does not reach out.
  task automatic run(input logic [15:0] x, input logic [15:0] y, input logic has_exp,
                     input logic [31:0] given);
    logic [31:0] exp;
    int c0;
    exp = has_exp ? given : {16'b0, x} * {16'b0, y};
    a = x; b = y;
    c0 = cycles;
    @(posedge clk); #1;
    checks++;
    if (out != exp || cycles != c0 + 1) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h got %h exp %h after %0d cycles", x, y, out, exp, cycles - c0);
    end
    // disturb the operands mid-cycle: the register must hold its value
    a = ~x; b = y ^ 16'h5a5a;
    #3;
    checks++;
    if (out != exp) begin
      failures++;
      if (failures < 10) $display("FAIL output changed between edges: %h", out);
    end else holds++;
  endtask

  initial begin
    a = '0; b = '0;
    @(posedge clk); #1;
    // operand pairs and products printed in the published waveform
    run(16'h0001, 16'h0000, 1'b1, 32'h00000000);
    run(16'h0002, 16'h0001, 1'b1, 32'h00000002);
    run(16'h0003, 16'h0002, 1'b1, 32'h00000006);
    run(16'h0004, 16'h0003, 1'b1, 32'h0000000C);
    run(16'hffff, 16'hffff, 1'b0, '0);
    run(16'h0000, 16'h0000, 1'b0, '0);
    run(16'hffff, 16'h0001, 1'b0, '0);
    for (int i = 0; i < NRAND; i++) run(16'($urandom), 16'($urandom), 1'b0, '0);
    $display("crosswise carries=%0d middle carries=%0d csa carry-1 selections=%0d register holds=%0d",
             cross_carries, mid_carries, csa_selects, holds);
    if (cross_carries == 0) begin failures++; $display("FAIL no crosswise carry"); end
    if (mid_carries == 0)   begin failures++; $display("FAIL no middle-stage carry"); end
    if (csa_selects == 0)   begin failures++; $display("FAIL no carry-1 selection"); end
    if (holds == 0)         begin failures++; $display("FAIL register hold never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
