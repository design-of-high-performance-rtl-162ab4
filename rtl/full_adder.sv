// full_adder: one-bit full adder, the cell of the ripple-carry accurate part.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The accurate part is a ripple-carry adder; the cell's own gate-level form
// is not prescribed, so this sum/majority form is a choice of this design.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;
  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
