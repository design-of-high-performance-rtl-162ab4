// carry_free_addition_block: the sum generator of the inaccurate part.
//
// W modified XOR cells side by side, one per lower sum bit, with no
// connection between neighbouring bits: S_i = CTL_i ? 1 : A_i ^ B_i.
// The control word comes from eta_control_block, which decides at which bit
// the result switches from XOR mode to "all ones".
//
// Ports: a, b, ctl (W bits) -> sum (W bits). Combinational. W = 20 in the
// 32-bit adder.
module carry_free_addition_block #(
  parameter int unsigned W = 20
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] ctl,
  output logic [W-1:0] sum
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    modified_xor u_mxor (
      .a  (a[i]),
      .b  (b[i]),
      .ctl(ctl[i]),
      .sum(sum[i])
    );
  end
endmodule
