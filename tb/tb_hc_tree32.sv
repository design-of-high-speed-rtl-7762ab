// Self-checking testbench of hc_tree32.
// Operands are applied while phi = 0; all carries and group propagates must read 0 (precharge).
// After phi rises they must equal the reference: the carry into bit 4k is bit 4k of the sum of
// the operands' low 4k bits, computed with plain 64-bit arithmetic. Stimulus: the critical
// operation (a = 1, b = all ones: a carry generated at bit 0 ripples through every position),
// a single generate at every bit position under an all-propagate field, long propagate runs
// with random generates, and uniformly random operands.
module tb_hc_tree32;
  import pp_tree_pkg::*;

  logic                 phi;
  logic [TREE_BITS-1:0] a, b;
  logic [NUM_LEV1:1]    carry;
  logic                 pp15;
  int checks = 0, failures = 0;

  hc_tree32 dut (.phi(phi), .a(a), .b(b), .carry(carry), .pp15(pp15));

  task automatic check(input logic [NUM_LEV1:1] got, input logic [NUM_LEV1:1] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s a=%h b=%h phi=%b got=%b exp=%b", what, a, b, phi, got, exp);
    end
  endtask

  task automatic apply(input logic [TREE_BITS-1:0] ta, input logic [TREE_BITS-1:0] tb);
    logic [NUM_LEV1:1] exp;
    longint unsigned mask, s;
    phi = 0;
    a = ta;
    b = tb;
    #5;
    check(carry, '0, "precharge carry");
    check({6'b0, pp15}, '0, "precharge pp");
    phi = 1;
    #5;
    for (int k = 1; k <= NUM_LEV1; k++) begin
      mask = (64'd1 << (RADIX * k)) - 1;
      s = (longint'(a) & mask) + (longint'(b) & mask);
      exp[k] = s[RADIX*k];
    end
    check(carry, exp, "carry");
    check({6'b0, pp15}, {6'b0, &(a[15:0] | b[15:0])}, "pp");
  endtask

  initial begin
    logic [TREE_BITS-1:0] r, allp;
    phi = 0; a = 0; b = 0;
    allp = '1;
    apply(28'd1, '1);                       // critical operation
    if (carry !== '1) $display("critical operation did not propagate");
    for (int x = 0; x < TREE_BITS; x++) begin
      r = allp << x;
      apply(TREE_BITS'(1) << x, r);          // generate at x, propagate above
      apply(TREE_BITS'(1) << x, r & ~(TREE_BITS'(1) << (TREE_BITS - 1)));
    end
    for (int i = 0; i < 2000; i++) begin
      r = TREE_BITS'($urandom);
      apply(r, ~r ^ (TREE_BITS'(1) << ($urandom % TREE_BITS)));  // long propagate runs
      apply(TREE_BITS'($urandom), TREE_BITS'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
