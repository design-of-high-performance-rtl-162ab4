// tb_ripple_carry_adder: self-checking test of the 12-bit ripple-carry
// adder (the accurate part). Exhaustive over both operands with carry-in 0
// (the way the adder is used), plus random operands with carry-in 1.
// Expected values come from the integer sum a + b + cin.
module tb_ripple_carry_adder;
  localparam int W = 12;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int unsigned exp_v;
    #1;
    exp_v = int'(a) + int'(b) + int'(cin);
    checks++;
    if ({cout, sum} !== (W+1)'(exp_v)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%0b got=%h exp=%h", a, b, cin, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    cin = 1'b0;
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        a = W'(x); b = W'(y); check();
      end
    end
    cin = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      a = W'($urandom); b = W'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
