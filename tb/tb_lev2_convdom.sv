// Self-checking testbench of lev2_convdom.
// All 256 combinations of the four (GP, GG) pairs, in precharge (outputs 0) and in evaluate,
// against a plain prefix loop for GGG and the AND of all GP for GGP.
module tb_lev2_convdom;
  logic       phi;
  logic [3:0] gp, gg;
  logic       ggp, ggg;
  int checks = 0, failures = 0;

  lev2_convdom dut (.phi(phi), .gp(gp), .gg(gg), .ggp(ggp), .ggg(ggg));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s gp=%b gg=%b phi=%b got=%b exp=%b", what, gp, gg, phi, got, exp);
    end
  endtask

  initial begin
    logic run;
    phi = 0; gp = 0; gg = 0;
    for (int i = 0; i < 256; i++) begin
      phi = 0;
      gp = i[3:0];
      gg = i[7:4];
      #1;
      check(ggp, 1'b0, "precharge ggp");
      check(ggg, 1'b0, "precharge ggg");
      phi = 1;
      #1;
      run = gg[0];
      for (int k = 1; k < 4; k++) run = gg[k] | (gp[k] & run);
      check(ggp, &gp, "ggp");
      check(ggg, run, "ggg");
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
