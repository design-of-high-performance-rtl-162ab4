// modified_xor: one sum bit of the carry-free addition block.
//
// With CTL low the cell is an ordinary XOR of A and B (one-bit addition that
// neither takes nor produces a carry). With CTL high the output is forced to
// 1. In the transistor circuit this is an XOR with three extra transistors:
// two that disconnect the XOR when CTL is high and one that pulls the output
// node to VDD. Here the same function is written as logic: sum = ctl | (a ^ b).
//
// Ports: a, b, ctl -> sum. Combinational.
module modified_xor (
  input  logic a,
  input  logic b,
  input  logic ctl,
  output logic sum
);
  always_comb sum = ctl ? 1'b1 : (a ^ b);
endmodule
