// tb_csgc_type2: exhaustive self-checking test of the type II control signal
// generating cell. Expected: ctl_i is high when both operand bits are 1, the
// left neighbour's control signal is high, or the control signal of the
// previous group's leftmost cell (the jump input) is high.
module tb_csgc_type2;
  logic a_i, b_i, ctl_next, ctl_jump, ctl_i;
  int checks = 0, failures = 0;

  csgc_type2 dut (
    .a_i(a_i), .b_i(b_i), .ctl_next(ctl_next), .ctl_jump(ctl_jump), .ctl_i(ctl_i)
  );

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_c;
      {ctl_jump, ctl_next, a_i, b_i} = 4'(v);
      #1;
      exp_c = (a_i == 1'b1 && b_i == 1'b1) || ctl_next == 1'b1 || ctl_jump == 1'b1;
      checks++;
      if (ctl_i !== exp_c) begin
        failures++;
        $display("FAIL a=%0b b=%0b next=%0b jump=%0b ctl=%0b exp=%0b",
                 a_i, b_i, ctl_next, ctl_jump, ctl_i, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
