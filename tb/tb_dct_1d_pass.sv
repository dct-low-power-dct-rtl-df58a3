// tb_dct_1d_pass: sends blocks through two 1-D DCT passes side by side, the
// 8-bit unsigned pixel form and the 12-bit signed form, with the same valid
// pattern (random idle cycles). Blocks alternate between smooth gradients and
// random data. For each block the 64 results must equal the rounded 1-D DCT
// computed here from cosines, res[k][i] = round(sum_j c(k,j) x(i,j) / 256)
// with c(k,j) = round(256 a(k) cos((2j+1) k pi / 16)), and 'done' must come
// exactly two clocks after the block's last operand.
module tb_dct_1d_pass;
  import cshm_pkg::*;
  int checks = 0, failures = 0, n_blocks = 0, n_skip = 0, n_idle = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0]  xa = '0;
  logic [11:0] xb = '0;
  logic done_a, done_b, skv_a, skv_b;
  logic signed [11:0] res_a [DCT_N][DCT_N];
  logic signed [15:0] res_b [DCT_N][DCT_N];
  logic [1:0] sk_a [DCT_N];
  logic [2:0] sk_b [DCT_N];

  dct_1d_pass #(.NNIB(2), .SIGNED_X(1'b0), .OUT_W(12)) u_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xa), .done(done_a), .res(res_a),
    .skip_valid(skv_a), .skip(sk_a));
  dct_1d_pass #(.NNIB(3), .SIGNED_X(1'b1), .OUT_W(16)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(xb), .done(done_b), .res(res_b),
    .skip_valid(skv_b), .skip(sk_b));

  always #5 clk = ~clk;

  int cref [8][8];
  function automatic int round_coef(int k, int n);
    real a, v;
    a = (k == 0) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.5;
    v = 256.0 * a * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  int blk_a [8][8], blk_b [8][8];   // [i][j]
  int exp_a [8][8], exp_b [8][8];   // [k][i]

  task automatic make_block(input int b);
    int base;
    base = $urandom_range(0, 200);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        if (b % 2 == 0) blk_a[i][j] = base + 2 * i + j;
        else            blk_a[i][j] = $urandom_range(0, 255);
        blk_b[i][j] = (b % 2 == 0) ? (blk_a[i][j] * 4 - 512) : $urandom_range(0, 2100) - 1050;
      end
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 8; i++) begin
        int sa, sb;
        sa = 0; sb = 0;
        for (int j = 0; j < 8; j++) begin
          sa += cref[k][j] * blk_a[i][j];
          sb += cref[k][j] * blk_b[i][j];
        end
        exp_a[k][i] = (sa + 128) >>> 8;
        exp_b[k][i] = (sb + 128) >>> 8;
      end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count skip flags.
  always @(posedge clk)
    if (skv_a) for (int k = 0; k < 8; k++) if (sk_a[k] != 0) n_skip++;

  initial begin
    for (int k = 0; k < 8; k++) for (int n = 0; n < 8; n++) cref[k][n] = round_coef(k, n);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      make_block(b);
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          in_valid = 0;
          n_idle++;
          @(negedge clk);
        end
        in_valid = 1;
        xa = 8'(blk_a[t % 8][t / 8]);
        xb = 12'(blk_b[t % 8][t / 8]);
      end
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (done_a || done_b) begin failures++; $display("FAIL done one clock early"); end
      @(negedge clk);
      checks++;
      if (!(done_a && done_b)) begin failures++; $display("FAIL done missing, block %0d", b); end
      for (int k = 0; k < 8; k++)
        for (int i = 0; i < 8; i++) begin
          checks += 2;
          if (int'(res_a[k][i]) != exp_a[k][i]) begin
            failures++;
            if (failures < 15) $display("FAIL pixel block %0d k=%0d i=%0d got %0d exp %0d", b, k, i, res_a[k][i], exp_a[k][i]);
          end
          if (int'(res_b[k][i]) != exp_b[k][i]) begin
            failures++;
            if (failures < 15) $display("FAIL signed block %0d k=%0d i=%0d got %0d exp %0d", b, k, i, res_b[k][i], exp_b[k][i]);
          end
        end
      n_blocks++;
    end
    checks += 2;
    if (n_skip == 0) begin failures++; $display("FAIL no skip happened"); end
    if (n_idle == 0) begin failures++; $display("FAIL no idle cycle happened"); end
    $display("blocks %0d, multiplier skips %0d, idle cycles %0d", n_blocks, n_skip, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
