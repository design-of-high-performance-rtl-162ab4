// ripple_carry_adder: the accurate part of the error-tolerant adder.
//
// A W-bit ripple-carry adder built from a chain of full_adder cells: the
// carry enters at bit 0 and ripples to bit W-1, so the result is exact. The
// ETA uses the ripple-carry adder for its upper 12 bits because it is the
// lowest-power conventional adder and, with only 12 bits, it is not on the
// critical path. In the ETA the carry-in is tied to 0 (grounded); it is kept
// as a port so the block is a general adder.
//
// Ports: a, b (W bits), cin -> sum (W bits), cout. Combinational, no clock.
module ripple_carry_adder #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];
endmodule
