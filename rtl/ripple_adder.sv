// ripple_adder: WIDTH-bit ripple-carry adder built from a chain of full
// adders. It is the building block of each carry-select section: every
// section above the lowest holds two of these, one with carry in 0 and one
// with carry in 1. Purely combinational.
module ripple_adder #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[WIDTH];
endmodule
