// half_adder: one-bit half adder, the base cell of the 2x2 Vedic multiplier.
// The carry is the AND of the two inputs and the sum is their exclusive OR.
// The port names in_x, in_y, out_sum and out_carry, and the AND gate on the
// carry, follow the published half-adder schematic; the sum gate is written
// here as the XOR a half adder requires. Purely combinational, no clock.
module half_adder (
  input  logic in_x,
  input  logic in_y,
  output logic out_sum,
  output logic out_carry
);
  always_comb begin
    out_sum   = in_x ^ in_y;
    out_carry = in_x & in_y;
  end
endmodule
