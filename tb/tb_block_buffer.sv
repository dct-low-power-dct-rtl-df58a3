// tb_block_buffer: loads random 8x8 arrays, with gaps between loads and also
// back to back (a load in the cycle of the last output), and checks that the
// 64 outputs start one clock after the load, run without gaps, come out in
// the transposed order din[t mod 8][t div 8] and that 'first' marks t = 0.
module tb_block_buffer;
  import cshm_pkg::*;
  int checks = 0, failures = 0, n_back_to_back = 0;

  logic clk = 0, rst_n = 0, load = 0;
  logic signed [11:0] din [DCT_N][DCT_N];
  logic signed [11:0] dout;
  logic out_valid, first;

  block_buffer #(.W(12)) dut (.clk(clk), .rst_n(rst_n), .load(load), .din(din),
                              .out_valid(out_valid), .first(first), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_blk [8][8];

  task automatic fill();
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        ref_blk[a][b] = $urandom_range(0, 4095) - 2048;
        din[a][b] = 12'(ref_blk[a][b]);
      end
  endtask

  initial begin
    for (int a = 0; a < 8; a++) for (int b = 0; b < 8; b++) din[a][b] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fill();
    load = 1;
    for (int blk = 0; blk < 30; blk++) begin
      bit b2b;
      @(negedge clk);
      load = 0;
      b2b = (blk % 3 != 2);
      for (int t = 0; t < 64; t++) begin
        int e;
        e = ref_blk[t % 8][t / 8];
        checks++;
        if (!out_valid || int'(dout) != e || first != (t == 0)) begin
          failures++;
          if (failures < 15) $display("FAIL blk %0d t %0d valid=%b first=%b got %0d exp %0d", blk, t, out_valid, first, dout, e);
        end
        // Scramble din while streaming: the buffer must hold its copy.
        din[$urandom_range(0, 7)][$urandom_range(0, 7)] = 12'($urandom);
        if (t == 63 && b2b) begin
          fill();
          load = 1;
          n_back_to_back++;
        end
        if (t != 63) @(negedge clk);
      end
      if (!b2b) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("FAIL output past 64 values"); end
        repeat ($urandom_range(0, 5)) @(negedge clk);
        fill();
        load = 1;
      end
    end
    checks++;
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
