// tb_precomputer_bank: for every 8-bit signed coefficient C checks that output
// i of the bank equals (2i+1)*C.
module tb_precomputer_bank;
  import cshm_pkg::*;
  int checks = 0, failures = 0;
  logic signed [COEF_W-1:0] c;
  logic signed [PRE_W-1:0]  pre [NUM_PRE];

  precomputer_bank dut (.c(c), .pre(pre));

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
      for (int i = 0; i < NUM_PRE; i++) begin
        checks++;
        if (int'(pre[i]) != (2 * i + 1) * v) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d pre[%0d]=%0d", v, i, pre[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
