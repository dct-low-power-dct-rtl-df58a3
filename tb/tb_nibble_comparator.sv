// tb_nibble_comparator: drives random nibbles (biased towards repeats) with
// random enable gaps and checks 'same' against the last enabled nibble kept
// here; 'same' must be low before the first enabled nibble after reset.
module tb_nibble_comparator;
  import cshm_pkg::*;
  int checks = 0, failures = 0, n_same = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [NIB_W-1:0] cur = '0;
  logic same;
  logic [NIB_W-1:0] prev;
  bit have_prev = 0;

  nibble_comparator dut (.clk(clk), .rst_n(rst_n), .en(en), .cur(cur), .same(same));

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
      en  = ($urandom_range(0, 3) != 0);
      cur = ($urandom_range(0, 1) == 0) ? cur : NIB_W'($urandom);
      #1;
      checks++;
      if (same !== (have_prev && cur == prev)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d cur=%h prev=%h same=%b", s, cur, prev, same);
      end
      if (same) n_same++;
      if (en) begin prev = cur; have_prev = 1; end
    end
    checks++;
    if (n_same == 0) begin failures++; $display("FAIL no repeat seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
