// Self-checking testbench of lev3_convcd.
// All 256 combinations of the four (GP, GG) pairs are applied, first in precharge (all outputs
// 0), then in evaluate. The expected carries come from a plain sequential prefix loop,
// c <- GG_k | GP_k & c, starting from c = GG_0; the expected pp is the AND of all GP.
module tb_lev3_convcd;
  logic       phi;
  logic [3:0] gp, gg;
  logic       pp;
  logic [3:1] c;
  int checks = 0, failures = 0;

  lev3_convcd dut (.phi(phi), .gp(gp), .gg(gg), .pp(pp), .c(c));

  task automatic check(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s gp=%b gg=%b phi=%b got=%b exp=%b", what, gp, gg, phi, got, exp);
    end
  endtask

  initial begin
    logic [3:1] exp_c;
    logic       run;
    phi = 0; gp = 0; gg = 0;
    for (int i = 0; i < 256; i++) begin
      phi = 0;
      gp = i[3:0];
      gg = i[7:4];
      #1;
      check({3'b0, pp}, 4'b0, "precharge pp");
      check({1'b0, c}, 4'b0, "precharge c");
      phi = 1;
      #1;
      run = gg[0];
      for (int k = 1; k < 4; k++) begin
        run = gg[k] | (gp[k] & run);
        exp_c[k] = run;
      end
      check({3'b0, pp}, {3'b0, &gp}, "pp");
      check({3'b0, c[1]}, {3'b0, exp_c[1]}, "c1");
      check({3'b0, c[2]}, {3'b0, exp_c[2]}, "c2");
      check({3'b0, c[3]}, {3'b0, exp_c[3]}, "c3");
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
