// full_adder: one-bit full adder used inside the ripple-carry blocks of the
// carry-select adder. sum = a ^ b ^ cin, cout = majority(a, b, cin).
// Purely combinational. The cell itself is this design's choice: the carry
// select adder needs some ripple cell and the classic full adder is used.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end
endmodule
