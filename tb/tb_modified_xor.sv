// tb_modified_xor: exhaustive self-checking test of the modified XOR cell.
// All eight (a, b, ctl) combinations are applied; the expected output is
// a ^ b with ctl low and 1 with ctl high. Includes the point a=1, b=0,
// ctl=0 -> sum=1 shown in the cell's simulation waveform.
module tb_modified_xor;
  logic a, b, ctl, sum;
  int checks = 0, failures = 0;

  modified_xor dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_s;
      {ctl, a, b} = 3'(v);
      #1;
      exp_s = ctl ? 1'b1 : (a != b);
      checks++;
      if (sum !== exp_s) begin
        failures++;
        $display("FAIL a=%0b b=%0b ctl=%0b sum=%0b exp=%0b", a, b, ctl, sum, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
