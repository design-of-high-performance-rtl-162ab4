// tb_carry_free_addition_block: self-checking test of the 20-bit carry-free
// addition block. Random operands and control words, plus directed cases
// (control all low, all high, single bits). Each sum bit is checked against
// ctl ? 1 : a ^ b, worked out bit by bit in the testbench.
module tb_carry_free_addition_block;
  localparam int W = 20;
  logic [W-1:0] a, b, ctl, sum;
  int checks = 0, failures = 0;

  carry_free_addition_block dut (.a(a), .b(b), .ctl(ctl), .sum(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] exp_s;
    #1;
    for (int i = 0; i < W; i++) exp_s[i] = ctl[i] ? 1'b1 : (a[i] != b[i]);
    checks++;
    if (sum !== exp_s) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h sum=%h exp=%h", a, b, ctl, sum, exp_s);
    end
  endtask

  initial begin
    // Control block output for A=0000A, B=00000 is all low: plain XOR.
    a = 20'h0000A; b = 20'h00000; ctl = '0; check();
    a = 20'h54444; b = 20'h41111; ctl = 20'h7FFFF; check();
    a = 20'hFFFFF; b = 20'hFFFFF; ctl = '0; check();
    a = 20'h00000; b = 20'h00000; ctl = '1; check();
    for (int i = 0; i < W; i++) begin
      a = 20'($urandom); b = 20'($urandom); ctl = 20'(1) << i; check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = 20'($urandom); b = 20'($urandom); ctl = 20'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
