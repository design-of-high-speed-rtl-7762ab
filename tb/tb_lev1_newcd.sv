// Self-checking testbench of lev1_newcd.
// Every one of the 256 operand pairs is applied during precharge (phi = 0), where both outputs
// must read 0, and then evaluated (phi = 1), where GP must equal "all four bits propagate"
// and GG the carry out of the 4-bit sum a + b, both computed here with plain arithmetic.
module tb_lev1_newcd;
  logic       phi;
  logic [3:0] a, b;
  logic       gp, gg;
  int checks = 0, failures = 0;

  lev1_newcd dut (.phi(phi), .a(a), .b(b), .gp(gp), .gg(gg));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s a=%h b=%h phi=%b got=%b exp=%b", what, a, b, phi, got, exp);
    end
  endtask

  initial begin
    logic [4:0] s;
    phi = 0; a = 0; b = 0;
    for (int i = 0; i < 256; i++) begin
      phi = 0;
      a = i[3:0];
      b = i[7:4];
      #1;
      check(gp, 1'b0, "precharge gp");
      check(gg, 1'b0, "precharge gg");
      phi = 1;
      #1;
      s = {1'b0, a} + {1'b0, b};
      check(gp, &(a | b), "gp");
      check(gg, s[4], "gg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
