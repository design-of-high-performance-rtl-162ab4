// eta_adder: error-tolerant adder (ETA), the top of the design.
//
// The operands are split at a joining point. The upper WIDTH-INACC_W bits
// (the accurate part) go to a ripple-carry adder whose carry-in is tied to
// 0, so they are added exactly. The lower INACC_W bits (the inaccurate part)
// are added without any carry: eta_control_block looks from the MSB of the
// lower part downwards for the first position where both bits are 1, and
// carry_free_addition_block outputs A_i ^ B_i above that position and 1 at
// it and below it. No carry passes from the lower part into the upper part.
// Both parts work at the same time, which removes the long carry chain.
//
// Default: 32 bits, 12 accurate and 20 inaccurate, control block in five
// groups of four cells, as in the 32-bit design. The carry out of the
// accurate part is brought out as cout, the (WIDTH+1)th result bit.
//
// Ports: a, b (WIDTH bits) -> sum (WIDTH bits), cout. Combinational, no
// clock or reset; the result is valid one propagation delay after the
// operands.
module eta_adder
  import eta_pkg::*;
#(
  parameter int unsigned WIDTH   = ETA_WIDTH,
  parameter int unsigned INACC_W = ETA_INACC_W,
  parameter int unsigned GROUP   = ETA_GROUP
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned ACC_W = WIDTH - INACC_W;

  if (INACC_W == 0 || INACC_W >= WIDTH) begin : g_bad_split
    $error("eta_adder: INACC_W must be between 1 and WIDTH-1");
  end

  logic [INACC_W-1:0] ctl;

  // Accurate part: conventional ripple-carry adder, carry-in grounded.
  ripple_carry_adder #(.W(ACC_W)) u_accurate (
    .a   (a[WIDTH-1:INACC_W]),
    .b   (b[WIDTH-1:INACC_W]),
    .cin (1'b0),
    .sum (sum[WIDTH-1:INACC_W]),
    .cout(cout)
  );

  // Inaccurate part: control block and carry-free addition block.
  eta_control_block #(.W(INACC_W), .GROUP(GROUP)) u_control (
    .a  (a[INACC_W-1:0]),
    .b  (b[INACC_W-1:0]),
    .ctl(ctl)
  );

  carry_free_addition_block #(.W(INACC_W)) u_carry_free (
    .a  (a[INACC_W-1:0]),
    .b  (b[INACC_W-1:0]),
    .ctl(ctl),
    .sum(sum[INACC_W-1:0])
  );
endmodule
