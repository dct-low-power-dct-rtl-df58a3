// tb_skipper: random fresh values, skip and enable; checks that pp is the
// fresh value when not skipping and the last value loaded (enabled and not
// skipped) when skipping.
module tb_skipper;
  import cshm_pkg::*;
  int checks = 0, failures = 0, n_skip = 0;
  logic clk = 0, rst_n = 0, en = 0, skip = 0;
  logic signed [PRE_W-1:0] fresh = '0, pp, model = '0;

  skipper dut (.clk(clk), .rst_n(rst_n), .en(en), .skip(skip), .fresh(fresh), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 2000; s++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      skip  = ($urandom_range(0, 1) == 0);
      fresh = PRE_W'($urandom);
      #1;
      checks++;
      if (pp !== (skip ? model : fresh)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d skip=%b pp=%0d model=%0d", s, skip, pp, model);
      end
      if (skip) n_skip++;
      if (en && !skip) model = fresh;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
