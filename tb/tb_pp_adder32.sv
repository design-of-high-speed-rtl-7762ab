// End-to-end testbench of pp_adder32, both carry-tree topologies side by side.
//
// A free-running clock drives the domino clock: operands change on the falling edge
// (precharge), and 4 time units after the rising edge, within the same evaluate phase, sum,
// cout and the tree carries of both adders are compared with a + b + cin worked out in 64-bit
// arithmetic. Just before the rising edge every tree carry must still read 0 (precharge).
// Mechanisms counted, each of which must occur at least once: precharge observed, evaluate
// observed, the critical operation (a = 1, b = all ones, every carry set), a carry-in that
// travels through the bit-0 fold into c4, a carry out of bit 31 (c32), and a result from each
// topology. Stimulus: directed corner cases, then random operands and long propagate runs.
module tb_pp_adder32;
  import pp_tree_pkg::*;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] a, b;
  logic             cin;
  logic [WIDTH-1:0] sum_bk, sum_hc;
  logic             cout_bk, cout_hc;
  logic [NUM_LEV1:1] carry_bk, carry_hc;

  int checks = 0, failures = 0;
  int n_precharge = 0, n_evaluate = 0, n_critical = 0, n_cin_fold = 0, n_overflow = 0;
  int n_bk = 0, n_hc = 0;

  pp_adder32 u_bk (
    .clk(clk), .a(a), .b(b), .cin(cin), .sum(sum_bk), .cout(cout_bk), .carry(carry_bk)
  );

  pp_adder32 #(.TREE(TREE_HAN_CARLSON)) u_hc (
    .clk(clk), .a(a), .b(b), .cin(cin), .sum(sum_hc), .cout(cout_hc), .carry(carry_hc)
  );

  always #5 clk = ~clk;

  function automatic logic [NUM_LEV1:1] ref_carry(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y,
                                                  input logic ci);
    longint unsigned mask, s;
    for (int k = 1; k <= NUM_LEV1; k++) begin
      mask = (64'd1 << (RADIX * k)) - 1;
      s = (longint'(x) & mask) + (longint'(y) & mask) + longint'(ci);
      ref_carry[k] = s[RADIX*k];
    end
  endfunction

  task automatic check(input logic [WIDTH:0] got, input logic [WIDTH:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s a=%h b=%h cin=%b got=%h exp=%h", what, a, b, cin, got, exp);
    end
  endtask

  // one addition: set operands in precharge, check in the following evaluate phase
  task automatic add(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y, input logic ci);
    logic [WIDTH:0] exp;
    logic [NUM_LEV1:1] exp_c;
    @(negedge clk);
    a = x;
    b = y;
    cin = ci;
    #4;  // still precharging
    check({25'b0, carry_bk}, '0, "bk precharge");
    check({25'b0, carry_hc}, '0, "hc precharge");
    n_precharge++;
    @(posedge clk);
    #4;  // same evaluate phase
    n_evaluate++;
    exp   = {1'b0, a} + {1'b0, b} + {32'b0, cin};
    exp_c = ref_carry(a, b, cin);
    check({cout_bk, sum_bk}, exp, "bk sum");
    check({cout_hc, sum_hc}, exp, "hc sum");
    check({25'b0, carry_bk}, {25'b0, exp_c}, "bk carry");
    check({25'b0, carry_hc}, {25'b0, exp_c}, "hc carry");
    n_bk++;
    n_hc++;
    if (a == 32'd1 && b == '1 && carry_bk == '1 && carry_hc == '1) n_critical++;
    if (cin && (a[3:0] ^ b[3:0]) == 4'hF && exp_c[1]) n_cin_fold++;
    if (exp[WIDTH]) n_overflow++;
  endtask

  initial begin
    logic [WIDTH-1:0] r;
    a = 0; b = 0; cin = 0;
    add(32'd1, '1, 1'b0);          // critical operation
    add(32'd0, '1, 1'b1);          // carry-in ripples through all 32 bits
    add('1, '1, 1'b1);
    add(32'h0000_0000, 32'h0000_0000, 1'b1);
    add(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int x = 0; x < WIDTH; x++) begin
      add(32'd1 << x, '1 << x, 1'b0);
      add(32'd0, '1 << x, 1'b1);
    end
    for (int i = 0; i < 1000; i++) begin
      r = $urandom;
      add(r, ~r ^ (32'd1 << ($urandom % WIDTH)), 1'($urandom));
      add($urandom, $urandom, 1'($urandom));
    end

    if (n_precharge == 0) begin failures++; $display("precharge never observed"); end
    if (n_evaluate == 0)  begin failures++; $display("evaluate never observed"); end
    if (n_critical == 0)  begin failures++; $display("critical operation never observed"); end
    if (n_cin_fold == 0)  begin failures++; $display("carry-in fold never exercised"); end
    if (n_overflow == 0)  begin failures++; $display("carry out never exercised"); end
    if (n_bk == 0 || n_hc == 0) begin failures++; $display("a topology never ran"); end
    $display("mechanisms: precharge=%0d evaluate=%0d critical=%0d cin_fold=%0d overflow=%0d bk=%0d hc=%0d",
             n_precharge, n_evaluate, n_critical, n_cin_fold, n_overflow, n_bk, n_hc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
