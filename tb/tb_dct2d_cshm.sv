// tb_dct2d_cshm: end-to-end test of the 8x8 DCT at its default parameters.
// It streams 48 blocks (smooth gradients, flat blocks, random texture) in
// column order, mostly back to back and sometimes with idle cycles, and
// checks every output coefficient against a two-pass integer DCT worked out
// here from cosines, with the same rounding after each pass. It also checks
// the output order (column order, 'first' on Y(0,0)), that the 64 outputs of
// a block are contiguous, and the latency: the first coefficient is presented
// 68 clocks after the clock edge that accepted the block's last pixel when
// the pipeline is free. Each mechanism must occur at least once: upper and
// lower nibble skips in the row pass, skips in the column pass, input idle
// cycles and back-to-back blocks.
module tb_dct2d_cshm;
  import cshm_pkg::*;
  localparam int NBLK = 48;
  int checks = 0, failures = 0;
  int n_skip_hi = 0, n_skip_lo = 0, n_skip2 = 0, n_idle = 0, n_b2b = 0, n_ops1 = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] pixel = '0;
  logic out_valid, out_first, skip1_valid, skip2_valid;
  logic signed [15:0] coef_out;
  logic [1:0] skip1 [DCT_N];
  logic [2:0] skip2 [DCT_N];

  dct2d_cshm dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixel(pixel),
    .out_valid(out_valid), .out_first(out_first), .coef_out(coef_out),
    .skip1_valid(skip1_valid), .skip1(skip1), .skip2_valid(skip2_valid), .skip2(skip2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cref [8][8];
  function automatic int round_coef(int k, int n);
    real a, v;
    a = (k == 0) ? 1.0 / (2.0 * $sqrt(2.0)) : 0.5;
    v = 256.0 * a * $cos((2.0 * n + 1.0) * k * 3.14159265358979 / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  int img  [NBLK][8][8];   // pixels [blk][i][j]
  int yexp [NBLK][8][8];   // coefficients [blk][u][v]

  function automatic void reference(int b);
    int z [8][8];
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 8; v++) begin
        int s = 0;
        for (int j = 0; j < 8; j++) s += cref[v][j] * img[b][i][j];
        z[i][v] = (s + 128) >>> 8;
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        int s = 0;
        for (int i = 0; i < 8; i++) s += cref[u][i] * z[i][v];
        yexp[b][u][v] = (s + 128) >>> 8;
      end
  endfunction

  // Cycle counter and latency bookkeeping.
  int cyc = 0, last_accept [NBLK], first_seen [NBLK];
  int acc_blk = 0, acc_cnt = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      if (acc_cnt == 63) begin last_accept[acc_blk] = cyc; acc_blk++; acc_cnt = 0; end
      else acc_cnt++;
    end
  end
  always @(negedge clk) begin
    if (skip1_valid) begin
      n_ops1++;
      for (int k = 0; k < 8; k++) begin
        if (skip1[k][1]) n_skip_hi++;
        if (skip1[k][0]) n_skip_lo++;
      end
    end
    if (skip2_valid) for (int k = 0; k < 8; k++) if (skip2[k] != 0) n_skip2++;
  end

  // Output monitor, sampling mid-cycle; cyc then still holds the number of
  // the clock edge that opened the cycle.
  int out_blk = 0, out_cnt = 0;
  always @(negedge clk) begin
    if (out_valid && out_blk < NBLK) begin
      int u, v;
      u = out_cnt % 8;
      v = out_cnt / 8;
      checks++;
      if (int'(coef_out) != yexp[out_blk][u][v] || out_first != (out_cnt == 0)) begin
        failures++;
        if (failures < 15)
          $display("FAIL block %0d Y(%0d,%0d) got %0d exp %0d first=%b",
                   out_blk, u, v, coef_out, yexp[out_blk][u][v], out_first);
      end
      if (out_cnt == 0) first_seen[out_blk] = cyc;
      if (out_cnt == 63) begin out_cnt = 0; out_blk++; end
      else out_cnt++;
    end else if (out_cnt != 0) begin
      checks++;
      failures++;
      $display("FAIL gap inside output block %0d", out_blk);
    end
  end

  initial begin
    for (int k = 0; k < 8; k++) for (int n = 0; n < 8; n++) cref[k][n] = round_coef(k, n);
    for (int b = 0; b < NBLK; b++) begin
      int base;
      base = $urandom_range(0, 180);
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          case (b % 4)
            0: img[b][i][j] = base + 3 * i + 2 * j;        // gradient
            1: img[b][i][j] = base + $urandom_range(0, 3);  // nearly flat
            2: img[b][i][j] = $urandom_range(0, 255);       // texture
            default: img[b][i][j] = (i < 4) ? base : 255 - base / 2;
          endcase
      reference(b);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      if (b % 5 == 4) begin
        @(negedge clk);
        in_valid = 0;
        repeat (3) @(negedge clk);
      end else if (b > 0) n_b2b++;
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        if (b % 3 == 1 && $urandom_range(0, 7) == 0) begin
          in_valid = 0;
          n_idle++;
          @(negedge clk);
        end
        in_valid = 1;
        pixel = 8'(img[b][t % 8][t / 8]);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (200) @(negedge clk);

    checks++;
    if (out_blk != NBLK) begin failures++; $display("FAIL %0d of %0d blocks came out", out_blk, NBLK); end
    for (int b = 0; b < NBLK; b++) begin
      checks++;
      if (first_seen[b] - last_accept[b] != 68) begin
        failures++;
        if (failures < 20) $display("FAIL block %0d latency %0d", b, first_seen[b] - last_accept[b]);
      end
    end
    checks += 5;
    if (n_skip_hi == 0) begin failures++; $display("FAIL no upper-nibble skip"); end
    if (n_skip_lo == 0) begin failures++; $display("FAIL no lower-nibble skip"); end
    if (n_skip2 == 0)   begin failures++; $display("FAIL no column-pass skip"); end
    if (n_idle == 0)    begin failures++; $display("FAIL no idle input cycle"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back blocks"); end
    $display("row-pass multiplications %0d: upper skips %0d, lower skips %0d; column-pass skipping multiplications %0d; idle cycles %0d; back-to-back blocks %0d",
             n_ops1 * 8, n_skip_hi, n_skip_lo, n_skip2, n_idle, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
