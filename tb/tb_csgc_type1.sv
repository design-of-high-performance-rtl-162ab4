// tb_csgc_type1: exhaustive self-checking test of the type I control signal
// generating cell. Expected: ctl_i is high when both operand bits are 1 or
// the left neighbour's control signal is high.
module tb_csgc_type1;
  logic a_i, b_i, ctl_next, ctl_i;
  int checks = 0, failures = 0;

  csgc_type1 dut (.a_i(a_i), .b_i(b_i), .ctl_next(ctl_next), .ctl_i(ctl_i));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_c;
      {ctl_next, a_i, b_i} = 3'(v);
      #1;
      exp_c = (a_i == 1'b1 && b_i == 1'b1) || ctl_next == 1'b1;
      checks++;
      if (ctl_i !== exp_c) begin
        failures++;
        $display("FAIL a=%0b b=%0b next=%0b ctl=%0b exp=%0b", a_i, b_i, ctl_next, ctl_i, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
