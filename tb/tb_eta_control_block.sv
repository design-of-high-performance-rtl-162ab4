// tb_eta_control_block: self-checking test of the 20-bit control block.
// The expected control word is found by scanning the operands from the MSB
// for the first position where both bits are 1 and setting that bit and all
// below it. Operands are built so that the first such position falls at
// every bit, including the leftmost cells of all five groups, and cases
// with no such position are included.
module tb_eta_control_block;
  localparam int W = 20;
  logic [W-1:0] a, b, ctl;
  int checks = 0, failures = 0;

  eta_control_block dut (.a(a), .b(b), .ctl(ctl));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expected(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] r = '0;
    for (int i = W - 1; i >= 0; i--) begin
      if (x[i] && y[i]) begin
        for (int j = i; j >= 0; j--) r[j] = 1'b1;
        break;
      end
    end
    return r;
  endfunction

  task automatic check();
    logic [W-1:0] exp_c;
    #1;
    exp_c = expected(a, b);
    checks++;
    if (ctl !== exp_c) begin
      failures++;
      $display("FAIL a=%h b=%h ctl=%h exp=%h", a, b, ctl, exp_c);
    end
  endtask

  initial begin
    a = 20'h0000A; b = 20'h00000; check();
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 20'hAAAAA; b = 20'h55555; check();
    // First "1 + 1" position at bit p, random bits below, none above.
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < W; p++) begin
        logic [W-1:0] ra, rb, above;
        ra = W'($urandom); rb = W'($urandom);
        above = ~((W'(1) << p) - W'(1)) & ~(W'(1) << p);
        rb = (rb & ~above) | (~ra & above);
        ra[p] = 1'b1; rb[p] = 1'b1;
        a = ra; b = rb; check();
      end
    end
    // No position with both bits 1.
    for (int n = 0; n < 500; n++) begin
      a = W'($urandom); b = ~a & W'($urandom); check();
    end
    for (int n = 0; n < 2000; n++) begin
      a = W'($urandom); b = W'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
