// eta_control_block: control block of the inaccurate part.
//
// Finds, scanning from the MSB of the inaccurate part towards the LSB, the
// first position where both operand bits are 1, and drives CTL high at that
// position and at every position to its right. Below that point the
// carry-free addition block outputs all ones, which bounds the error caused
// by dropping the carries.
//
// Structure: W control signal generating cells, one per bit, arranged in
// W/GROUP groups of GROUP cells (five groups of four for W = 20). Inside a
// group each cell takes CTL from its left neighbour (type I). The leftmost
// cell of every group except the first is a type II cell that also takes the
// CTL of the leftmost cell of the previous group, so a high signal can jump
// a whole group. The leftmost cell of the first group has no left neighbour
// and sees 0. The worst-case path for W = 20 is ten cells instead of 20.
// Logically CTL_i is the OR of (A_j & B_j) over j >= i; the group links
// shorten the path, they do not change the function.
//
// Ports: a, b (W bits) -> ctl (W bits). Combinational. W must be a multiple
// of GROUP.
module eta_control_block #(
  parameter int unsigned W     = 20,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] ctl
);
  if (GROUP == 0 || W % GROUP != 0) begin : g_bad_size
    $error("eta_control_block: W must be a non-zero multiple of GROUP");
  end

  for (genvar i = 0; i < W; i++) begin : g_cell
    if (i == W - 1) begin : g_first
      // Leftmost cell of the whole block: nothing to its left.
      csgc_type1 u_cell (
        .a_i     (a[i]),
        .b_i     (b[i]),
        .ctl_next(1'b0),
        .ctl_i   (ctl[i])
      );
    end else if ((W - 1 - i) % GROUP == 0) begin : g_lead
      // Leftmost cell of a later group: also fed by the previous group's
      // leftmost cell, GROUP positions to the left.
      csgc_type2 u_cell (
        .a_i     (a[i]),
        .b_i     (b[i]),
        .ctl_next(ctl[i+1]),
        .ctl_jump(ctl[i+GROUP]),
        .ctl_i   (ctl[i])
      );
    end else begin : g_inner
      csgc_type1 u_cell (
        .a_i     (a[i]),
        .b_i     (b[i]),
        .ctl_next(ctl[i+1]),
        .ctl_i   (ctl[i])
      );
    end
  end
endmodule
