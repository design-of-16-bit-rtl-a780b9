// uts_combine: recombines the four partial products of one level of the
// recursive Vedic multiplier into the full product.
//
// With the operands split into halves, A = {AH, AL} and B = {BH, BL}, each
// H bits wide, the four sub-multipliers give
//   p_ll = AL*BL, p_lh = AL*BH, p_hl = AH*BL, p_hh = AH*BH   (2H bits each)
// and the product is p_hh<<2H + (p_lh + p_hl)<<H + p_ll. The adders follow
// the 16-bit block diagram:
//   * p_ll[H-1:0] is already final (C0..C7 at H = 8);
//   * the first carry-select stage adds p_lh, p_hl and p_ll[2H-1:H]; its low
//     H bits are final (C8..C15);
//   * the second stage adds p_hh and the remaining H+1 bits of the first
//     stage, giving the top 2H bits (C16..C31).
// The first stage takes three operands, so it is built here as two 2H-bit
// carry-select adders in a row. The H+1-bit carry word cannot exceed
// 2H+1 bits, so at most one of the two stage-1 carries is set, and the
// second stage can never carry out: both facts are checked by assertions.
// The low H bits of p are p_ll's low H bits wired straight through, as in the
// block diagram, so a synthesis report lists them as driven by an input.
// Purely combinational.
module uts_combine #(
  parameter int H = 8
) (
  input  logic [2*H-1:0] p_ll,
  input  logic [2*H-1:0] p_lh,
  input  logic [2*H-1:0] p_hl,
  input  logic [2*H-1:0] p_hh,
  output logic [4*H-1:0] p
);
  // section size of the carry-select adders: 4 bits, or H for small levels
  localparam int SEC = (H < 4) ? H : 4;

  if (H < 2) begin : g_bad_h
    $error("uts_combine needs H >= 2");
  end

  logic [2*H-1:0] cross_sum, mid_sum, high_sum;
  logic           cross_c, mid_c, high_c;
  logic           mid_top;

  // stage 1a: crosswise products p_lh + p_hl
  carry_select_adder #(.WIDTH(2*H), .BLOCK(SEC)) u_csa_cross (
    .a(p_lh), .b(p_hl), .cin(1'b0), .sum(cross_sum), .cout(cross_c)
  );
  // stage 1b: plus the upper half of the vertical product p_ll
  carry_select_adder #(.WIDTH(2*H), .BLOCK(SEC)) u_csa_mid (
    .a(cross_sum), .b({{H{1'b0}}, p_ll[2*H-1:H]}), .cin(1'b0),
    .sum(mid_sum), .cout(mid_c)
  );
  assign mid_top = cross_c | mid_c;

  // stage 2: upper vertical product p_hh plus the carried-over H+1 bits
  carry_select_adder #(.WIDTH(2*H), .BLOCK(SEC)) u_csa_high (
    .a(p_hh), .b({{(H-1){1'b0}}, mid_top, mid_sum[2*H-1:H]}), .cin(1'b0),
    .sum(high_sum), .cout(high_c)
  );

  assign p = {high_sum, mid_sum[H-1:0], p_ll[H-1:0]};

  // Arithmetic bounds that hold for any partial products of H-bit operands.
  always_comb begin
    assert (!(cross_c && mid_c)) else $error("uts_combine: both stage-1 carries set");
    assert (!high_c) else $error("uts_combine: stage-2 carry out set");
  end
endmodule
