// tb_half_adder: exhaustive self-check of the half adder. All four input
// pairs are applied and sum/carry are compared with the integer sum x + y.
// A watchdog ends the run with a failure if it does not complete in time.
module tb_half_adder;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.in_x(x), .in_y(y), .out_sum(s), .out_carry(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {x, y} = 2'(i);
      #1;
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%0b y=%0b got c=%0b s=%0b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
