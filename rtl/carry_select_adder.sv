// carry_select_adder: WIDTH-bit carry-select adder (the "CSA" of the 16-bit
// Vedic multiplier; here CSA always means carry *select*).
//
// The operands are cut into sections of BLOCK bits (the top section may be
// narrower). The lowest section is a plain ripple-carry adder fed by cin.
// Every higher section computes its sum twice in parallel, once assuming a
// carry in of 0 and once of 1, and a 2:1 multiplexer picks the right pair
// (sum, carry) as soon as the carry out of the section below is known. The
// carry therefore passes through one multiplexer per section instead of
// rippling through every bit.
//
// Interface: sum/cout = a + b + cin, purely combinational.
// The 16-bit width follows the multiplier's block diagram; the 4-bit section
// size and the duplicated ripple adders (rather than an excess-one converter)
// are this design's own choices.
module carry_select_adder #(
  parameter int WIDTH = 16,
  parameter int BLOCK = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NSEC = (WIDTH + BLOCK - 1) / BLOCK;

  // carry into each section; c[NSEC] is the final carry out
  logic [NSEC:0] c;
  assign c[0] = cin;

  for (genvar s = 0; s < NSEC; s++) begin : g_sec
    localparam int LO = s * BLOCK;
    localparam int W  = (WIDTH - LO < BLOCK) ? (WIDTH - LO) : BLOCK;
    if (s == 0) begin : g_first
      ripple_adder #(.WIDTH(W)) u_rca (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(c[0]),
        .sum(sum[LO +: W]), .cout(c[1])
      );
    end else begin : g_sel
      logic [W-1:0] s0, s1;
      logic         c0, c1;
      ripple_adder #(.WIDTH(W)) u_rca0 (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(1'b0), .sum(s0), .cout(c0)
      );
      ripple_adder #(.WIDTH(W)) u_rca1 (
        .a(a[LO +: W]), .b(b[LO +: W]), .cin(1'b1), .sum(s1), .cout(c1)
      );
      always_comb begin
        sum[LO +: W] = c[s] ? s1 : s0;
        c[s+1]       = c[s] ? c1 : c0;
      end
    end
  end

  assign cout = c[NSEC];
endmodule
