// tb_eta_adder: end-to-end self-checking test of the 32-bit error-tolerant
// adder at its default parameters (12 accurate bits, 20 inaccurate bits,
// control block in five groups of four).
//
// The expected result is computed independently of the RTL: the upper 12
// bits by integer addition, the lower 20 bits by the scan rule (from the MSB
// of the lower part, XOR each bit pair until the first pair of ones, then
// ones from there to the LSB). Directed vectors come from the published
// adder waveform; random operands follow. The test also measures the
// accuracy ACC = 1 - |Rc - Re| / Rc of every result against the exact sum and
// the acceptance probability AP = P(ACC > 95 %) over uniform random 32-bit
// operands, and checks AP >= 98 %, the example requirement used to choose
// the 12/20 split.
//
// Every result is also held to the error bound of the arithmetic: never above
// the exact sum, exact without a pair of ones in the lower part, and less than
// 2**20 below it otherwise.
//
// Each mechanism is counted and must occur: plain XOR mode (no pair of ones
// in the lower part), forced-ones mode, a high control signal crossing a
// group boundary (so a type II cell takes it), a carry out of the accurate
// part, and an inexact result.
module tb_eta_adder;
  localparam int W = 32;
  localparam int M = 20;   // inaccurate bits
  localparam int G = 4;    // cells per control group

  logic [W-1:0] a, b, sum;
  logic         cout;
  int checks = 0, failures = 0;

  int n_xor_mode = 0, n_ones_mode = 0, n_group_cross = 0, n_cout = 0, n_inexact = 0;
  longint n_ap_total = 0, n_ap_accept = 0;

  eta_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: {carry, sum} of the error-tolerant arithmetic.
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

  // Highest bit position in the lower part where both operands are 1, or -1.
  function automatic int first_pair(logic [W-1:0] x, logic [W-1:0] y);
    for (int i = M - 1; i >= 0; i--) if (x[i] && y[i]) return i;
    return -1;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0]   exp_r;
    longint       rc, re, oe;
    int           p;
    a = x; b = y;
    #1;
    exp_r = eta_ref(x, y);
    checks++;
    if ({cout, sum} !== exp_r) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h got=%0b_%h exp=%0b_%h", x, y, cout, sum, exp_r[W], exp_r[W-1:0]);
    end
    p = first_pair(x, y);
    if (p < 0) n_xor_mode++; else n_ones_mode++;
    if (p >= G) n_group_cross++;   // high control signal leaves its group
    if (cout) n_cout++;
    rc = longint'(x) + longint'(y);
    re = longint'({cout, sum});
    oe = (rc > re) ? rc - re : re - rc;
    if (oe != 0) n_inexact++;
    // Error bound of the arithmetic: the result never exceeds the exact sum,
    // is exact when the lower part has no pair of ones, and is otherwise
    // short by 1 plus the exact sum of the bits below the first pair, which
    // is less than 2**M.
    checks++;
    if (re > rc || oe >= (longint'(1) << M) || ((p < 0) != (oe == 0))) begin
      failures++;
      if (failures < 10) $display("FAIL error bound a=%h b=%h OE=%0d p=%0d", x, y, oe, p);
    end
  endtask

  // Directed vector with the printed result of the adder waveform.
  task automatic apply_known(logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] s, logic c);
    apply(x, y);
    checks++;
    if (sum !== s || cout !== c) begin
      failures++;
      $display("FAIL known a=%h b=%h got=%0b_%h exp=%0b_%h", x, y, cout, sum, c, s);
    end
  endtask

  initial begin
    apply_known(32'h00000000, 32'h00000000, 32'h00000000, 1'b0);
    apply_known(32'h55554444, 32'h44441111, 32'h9997FFFF, 1'b0);
    apply_known(32'h78878998, 32'h34560789, 32'hACD7FFFF, 1'b0);
    // Upper parts 0x678 + 0xABC overflow; bit 19 has both operands 1.
    apply_known(32'h6789ABCD, 32'hABC90087, 32'h134FFFFF, 1'b1);
    apply(32'h89765432, 32'h12345678);
    apply(32'hFFFFFFFF, 32'hFFFFFFFF);
    apply(32'hFFFFFFFF, 32'h00000001);
    apply(32'h000FFFFF, 32'h00000001);

    // Uniform random operands; also the acceptance-probability measurement.
    for (int n = 0; n < 200000; n++) begin
      logic [W:0] rc;
      logic [W-1:0] x, y;
      longint oe;
      x = $urandom; y = $urandom;
      apply(x, y);
      rc = {1'b0, x} + {1'b0, y};
      oe = longint'(rc) - longint'({cout, sum});
      if (oe < 0) oe = -oe;
      n_ap_total++;
      // ACC > 95 %  <=>  OE / Rc < 0.05  <=>  20 * OE < Rc
      if (rc == 0 || 20 * oe < longint'(rc)) n_ap_accept++;
    end

    // Operands with few ones in the lower part, so the first pair of ones
    // falls at every position, plain XOR mode included.
    for (int n = 0; n < 20000; n++) begin
      logic [W-1:0] x, y;
      x = $urandom; y = $urandom;
      y[M-1:0] = y[M-1:0] & ~x[M-1:0];
      if (n % 2 == 0) begin
        int p = n / 2 % M;
        x[p] = 1'b1; y[p] = 1'b1;
        for (int i = p + 1; i < M; i++) y[i] = y[i] & ~x[i];
      end
      apply(x, y);
    end

    checks++;
    if (n_ap_accept * 100 < n_ap_total * 98) begin
      failures++;
      $display("FAIL acceptance probability %0d/%0d below 98%%", n_ap_accept, n_ap_total);
    end
    $display("AP(MAA=95%%) over uniform 32-bit operands: %0d/%0d", n_ap_accept, n_ap_total);
    $display("mechanisms: xor_mode=%0d ones_mode=%0d group_cross=%0d cout=%0d inexact=%0d",
             n_xor_mode, n_ones_mode, n_group_cross, n_cout, n_inexact);
    checks += 5;
    if (n_xor_mode == 0)    begin failures++; $display("FAIL plain XOR mode never seen"); end
    if (n_ones_mode == 0)   begin failures++; $display("FAIL forced-ones mode never seen"); end
    if (n_group_cross == 0) begin failures++; $display("FAIL no group crossing seen"); end
    if (n_cout == 0)        begin failures++; $display("FAIL no carry out seen"); end
    if (n_inexact == 0)     begin failures++; $display("FAIL no inexact result seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
