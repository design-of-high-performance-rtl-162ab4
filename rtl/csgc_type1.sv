// csgc_type1: control signal generating cell (CSGC) of type I.
//
// Raises CTL_i when both operand bits of its position are 1, or when the
// cell to its left (CTL_{i+1}) has already raised its control signal. A
// chain of these cells therefore carries a high control signal from the
// first "1 + 1" position down to the LSB.
//
// Ports: a_i, b_i, ctl_next (CTL_{i+1}) -> ctl_i. Combinational.
module csgc_type1 (
  input  logic a_i,
  input  logic b_i,
  input  logic ctl_next,
  output logic ctl_i
);
  always_comb ctl_i = (a_i & b_i) | ctl_next;
endmodule
