// Self-checking testbench of sum4: all 512 combinations of a, b and cin against a + b + cin.
module tb_sum4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  sum4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    logic [4:0] exp;
    for (int i = 0; i < 512; i++) begin
      a   = i[3:0];
      b   = i[7:4];
      cin = i[8];
      #1;
      exp = {1'b0, a} + {1'b0, b} + {4'b0, cin};
      checks++;
      if ({cout, s} !== exp) begin
        failures++;
        if (failures <= 10) $display("FAIL a=%h b=%h cin=%b got=%b_%h exp=%b_%h", a, b, cin, cout, s, exp[4], exp[3:0]);
      end
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
