// vedic_mul2: 2x2-bit multiplier after the Urdhva Tiryakbhyam ("vertically
// and crosswise") rule, the leaf of the recursive Vedic multiplier.
//
// For a = a1a0 and b = b1b0:
//   vertical   : a0*b0            -> p[0]
//   crosswise  : a1*b0 + a0*b1    -> half adder 1, sum is p[1]
//   vertical   : a1*b1 + carry    -> half adder 2, gives p[2] and p[3]
// Four AND gates and two half adders; purely combinational. The three-step
// rule is the published one; the two-half-adder arrangement of the sums is
// the usual way of building it.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp10, pp01, pp11;
  logic cross_carry;

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
  end

  assign p[0] = pp00;
  half_adder u_ha_cross (.in_x(pp10), .in_y(pp01), .out_sum(p[1]), .out_carry(cross_carry));
  half_adder u_ha_top   (.in_x(pp11), .in_y(cross_carry), .out_sum(p[2]), .out_carry(p[3]));
endmodule
