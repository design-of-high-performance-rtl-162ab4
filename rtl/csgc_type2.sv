// csgc_type2: control signal generating cell (CSGC) of type II.
//
// The leftmost cell of every group but the first. Besides its own operand
// bits and CTL_{i+1} from its left neighbour, it takes CTL_{i+4}: the
// control signal of the leftmost cell of the group to the left. A high
// control signal can thus jump from group to group instead of rippling
// through every cell. CTL_i = (A_i & B_i) | CTL_{i+1} | CTL_{i+4}.
//
// Ports: a_i, b_i, ctl_next (CTL_{i+1}), ctl_jump (CTL_{i+4}) -> ctl_i.
// Combinational.
module csgc_type2 (
  input  logic a_i,
  input  logic b_i,
  input  logic ctl_next,
  input  logic ctl_jump,
  output logic ctl_i
);
  always_comb ctl_i = (a_i & b_i) | ctl_next | ctl_jump;
endmodule
