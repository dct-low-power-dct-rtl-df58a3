// tb_precomputer: checks K*C for every 8-bit signed C and for a one-, two-,
// three- and four-term multiple (K = 1, 9, 11, 15). Combinational, so the
// watchdog counts loop steps rather than clocks.
module tb_precomputer;
  import cshm_pkg::*;
  int checks = 0, failures = 0;
  logic signed [COEF_W-1:0] c;
  logic signed [PRE_W-1:0]  k1, k9, k11, k15;

  precomputer #(.K(1))  u1  (.c(c), .kc(k1));
  precomputer #(.K(9))  u9  (.c(c), .kc(k9));
  precomputer #(.K(11)) u11 (.c(c), .kc(k11));
  precomputer #(.K(15)) u15 (.c(c), .kc(k15));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s c=%0d got %0d exp %0d", what, c, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      c = COEF_W'(v);
      #1;
      chk(int'(k1),  v,      "1C");
      chk(int'(k9),  9 * v,  "9C");
      chk(int'(k11), 11 * v, "11C");
      chk(int'(k15), 15 * v, "15C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
