// tb_select_unit: feeds the select unit a bank of odd multiples (1C..15C,
// computed here) and checks that every nibble value 0..15 yields nibble*C,
// for every 8-bit signed C.
module tb_select_unit;
  import cshm_pkg::*;
  int checks = 0, failures = 0;
  logic signed [PRE_W-1:0] pre [NUM_PRE];
  logic [NIB_W-1:0]        nib;
  logic signed [PRE_W-1:0] pp;

  select_unit dut (.pre(pre), .nib(nib), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      for (int i = 0; i < NUM_PRE; i++) pre[i] = PRE_W'((2 * i + 1) * v);
      for (int n = 0; n < 16; n++) begin
        nib = NIB_W'(n);
        #1;
        checks++;
        if (int'(pp) != n * v) begin
          failures++;
          if (failures < 10) $display("FAIL c=%0d nib=%0d pp=%0d", v, n, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
