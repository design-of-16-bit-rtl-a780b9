// vedic_mul16: 16x16-bit combinational Vedic (Urdhva Tiryakbhyam) multiplier.
//
// Both operands are split into halves, a = {AH, AL} and b = {BH, BL}, of 8
// bits. Four 8x8 multipliers form the vertical products AL*BL and AH*BH
// and the crosswise products AL*BH and AH*BL in parallel; uts_combine adds
// them with carry-select adders into the 32-bit product.
// The split into 8-bit halves and the two 16-bit carry-select adder stages
// follow the published 16-bit block diagram; the halving rule, applied down
// to the 2x2 multiplier, is the published recursion. Operands are treated
// as unsigned, which is this design's reading. No clock, no state: the
// product follows the operands after the combinational delay.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);
  logic [15:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mul8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .p(p_ll));
  vedic_mul8 u_lh (.a(a[7:0]),  .b(b[15:8]), .p(p_lh));
  vedic_mul8 u_hl (.a(a[15:8]), .b(b[7:0]),  .p(p_hl));
  vedic_mul8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(p_hh));

  uts_combine #(.H(8)) u_comb (
    .p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(c)
  );
endmodule
