// vedic_mul16_top: 16-bit Vedic multiplier with clock, operands A and B and
// the 32-bit product OUT, as in the top-level symbol of the design.
//
// The product is formed combinationally by vedic_mul16 (four 8x8 Vedic
// multipliers and two carry-select adder stages) and captured in a 32-bit
// output register on every rising edge of clk. Timing: operands applied
// before a rising edge appear on out right after that edge, one cycle of
// latency and one new product per cycle. There is no reset: out holds an
// undefined value until the first clock edge.
// The clock pin and the port set follow the published symbol; what the clock
// does (a single output register) is this design's choice.
module vedic_mul16_top (
  input  logic        clk,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] out
);
  logic [31:0] product;

  vedic_mul16 u_mul (.a(a), .b(b), .c(product));

  always_ff @(posedge clk) begin
    out <= product;
  end
endmodule
