// vedic_mul8: 8x8-bit combinational Vedic (Urdhva Tiryakbhyam) multiplier.
//
// Both operands are split into halves, a = {AH, AL} and b = {BH, BL}, of 4
// bits. Four 4x4 multipliers form the vertical products AL*BL and AH*BH
// and the crosswise products AL*BH and AH*BL in parallel; uts_combine adds
// them with carry-select adders into the 16-bit product.
// This halving rule, applied down to the 2x2 multiplier, is the published
// recursion. No clock, no state: the product follows the operands after the
// combinational delay.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mul4 u_ll (.a(a[3:0]),  .b(b[3:0]),  .p(p_ll));
  vedic_mul4 u_lh (.a(a[3:0]),  .b(b[7:4]), .p(p_lh));
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]),  .p(p_hl));
  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(p_hh));

  uts_combine #(.H(4)) u_comb (
    .p_ll(p_ll), .p_lh(p_lh), .p_hl(p_hl), .p_hh(p_hh), .p(p)
  );
endmodule
