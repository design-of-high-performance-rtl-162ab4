// tb_eta_adder_16: the error-tolerant adder at 16 bits split 8/8 (control
// block in two groups of four), the size of the worked example of the
// addition rule: A = 1011001110011010 (45978), B = 0110100100010011 (26899)
// gives 1_0001110010011111 (72863) instead of the exact 72877, an error of
// 14. That example is checked first, then random operands against the scan
// rule computed in the testbench.
module tb_eta_adder_16;
  localparam int W = 16;
  localparam int M = 8;

  logic [W-1:0] a, b, sum;
  logic         cout;
  int checks = 0, failures = 0;

  eta_adder #(.WIDTH(W), .INACC_W(M), .GROUP(4)) dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] eta_ref(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-M:0] hi;
    logic [M-1:0] lo;
    bit           ones = 1'b0;
    hi = (W-M+1)'(x[W-1:M]) + (W-M+1)'(y[W-1:M]);
    for (int i = M - 1; i >= 0; i--) begin
      if (!ones && x[i] && y[i]) ones = 1'b1;
      lo[i] = ones ? 1'b1 : (x[i] ^ y[i]);
    end
    return {hi, lo};
  endfunction

  initial begin
    a = 16'b1011001110011010; b = 16'b0110100100010011;
    #1;
    checks++;
    if ({cout, sum} !== 17'b10001110010011111 || int'({cout, sum}) != 72863) begin
      failures++;
      $display("FAIL worked example: got %0d", {cout, sum});
    end
    checks++;
    if (72877 - int'({cout, sum}) != 14) begin
      failures++;
      $display("FAIL worked example error: %0d", 72877 - int'({cout, sum}));
    end
    for (int n = 0; n < 100000; n++) begin
      logic [W:0] exp_r;
      a = W'($urandom); b = W'($urandom);
      #1;
      exp_r = eta_ref(a, b);
      checks++;
      if ({cout, sum} !== exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", a, b, {cout, sum}, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
