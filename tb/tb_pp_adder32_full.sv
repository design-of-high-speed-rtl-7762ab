// Full-size testbench of pp_adder32 at its default configuration (Brent-Kung tree).
//
// Runs the two published operating points of the 32-bit tree: the critical operation
// (a = 00000001, b = FFFFFFFF, which must set every carry c4..c28) and a sequence of 1000
// random operand pairs, the length of the energy-measurement sequence. One addition per clock
// cycle: operands are applied while clk = 0 and the result is checked in the same cycle's
// evaluate phase, 4 time units after the rising edge. The tree carries must read 0 just
// before each rising edge (precharge).
module tb_pp_adder32_full;
  import pp_tree_pkg::*;

  logic              clk = 1'b0;
  logic [WIDTH-1:0]  a, b, sum;
  logic              cin, cout;
  logic [NUM_LEV1:1] carry;
  int checks = 0, failures = 0, n_critical = 0;

  pp_adder32 dut (.clk(clk), .a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .carry(carry));

  always #5 clk = ~clk;

  task automatic add(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y, input logic ci);
    logic [WIDTH:0] exp;
    @(negedge clk);
    a = x;
    b = y;
    cin = ci;
    #4;
    checks++;
    if (carry !== '0) begin failures++; $display("FAIL precharge carry=%b", carry); end
    @(posedge clk);
    #4;
    exp = {1'b0, a} + {1'b0, b} + {32'b0, cin};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL a=%h b=%h cin=%b got=%b_%h exp=%b_%h", a, b, cin, cout, sum, exp[WIDTH], exp[WIDTH-1:0]);
    end
  endtask

  initial begin
    a = 0; b = 0; cin = 0;
    add(32'h0000_0001, 32'hFFFF_FFFF, 1'b0);   // critical operation
    checks++;
    if (carry !== '1) begin failures++; $display("FAIL critical operation carries=%b", carry); end
    else n_critical++;
    for (int i = 0; i < 1000; i++) add($urandom, $urandom, 1'b0);
    if (n_critical == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
