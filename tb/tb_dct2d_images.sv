// tb_dct2d_images: runs whole QCIF-sized frames (176 x 144 pixels, 396 8x8
// blocks) through two DCT instances side by side: the default one, in which
// both 4-bit groups of a pixel may skip, and the upper-group-only variant
// (SKIP_EN1 = 2'b10). Three synthetic frames stand in for test images of
// different character: a smooth, low-detail frame; a frame mixing smooth
// areas with edges and texture; and a highly textured frame. Every
// coefficient of both instances is checked against a two-pass integer DCT
// computed here, and for each frame the share of row-pass operands whose
// upper or lower group was skipped is printed. A smoother frame must skip
// more often than a textured one, and the upper-only variant must never skip
// a lower group.
module tb_dct2d_images;
  import cshm_pkg::*;
  localparam int IMG_W = 176, IMG_H = 144;
  localparam int NBX = IMG_W / 8, NBY = IMG_H / 8, NBLK = NBX * NBY;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0] pixel = '0;
  logic ov_a, of_a, s1v_a, s2v_a, ov_b, of_b, s1v_b, s2v_b;
  logic signed [15:0] y_a, y_b;
  logic [1:0] s1_a [DCT_N], s1_b [DCT_N];
  logic [2:0] s2_a [DCT_N], s2_b [DCT_N];

  dct2d_cshm u_both (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixel(pixel),
    .out_valid(ov_a), .out_first(of_a), .coef_out(y_a),
    .skip1_valid(s1v_a), .skip1(s1_a), .skip2_valid(s2v_a), .skip2(s2_a));
  dct2d_cshm #(.SKIP_EN1(2'b10)) u_upper (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .pixel(pixel),
    .out_valid(ov_b), .out_first(of_b), .coef_out(y_b),
    .skip1_valid(s1v_b), .skip1(s1_b), .skip2_valid(s2v_b), .skip2(s2_b));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // Synthetic frame f, pixel at column px, row py.
  function automatic int frame_pixel(int f, int px, int py);
    int v;
    case (f)
      0: v = 60 + px / 6 + py / 5 + (((px * 7 + py * 13) % 11 == 0) ? 1 : 0);
      1: begin
        if (px < 88) v = 40 + py / 2;
        else         v = ((px / 4 + py / 4) % 2 == 0) ? 200 - py / 3 : 90 + px / 8;
        v += $urandom_range(0, 6);
      end
      default: v = $urandom_range(0, 255);
    endcase
    return (v > 255) ? 255 : v;
  endfunction

  int img [IMG_H][IMG_W];
  int yexp [NBLK][8][8];

  function automatic void reference(int b);
    int z [8][8];
    int bx, by;
    bx = (b % NBX) * 8;
    by = (b / NBX) * 8;
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 8; v++) begin
        int s = 0;
        for (int j = 0; j < 8; j++) s += cref[v][j] * img[by + i][bx + j];
        z[i][v] = (s + 128) >>> 8;
      end
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        int s = 0;
        for (int i = 0; i < 8; i++) s += cref[u][i] * z[i][v];
        yexp[b][u][v] = (s + 128) >>> 8;
      end
  endfunction

  // Statistics and output checks, sampled mid-cycle.
  int n_ops, n_hi, n_lo, n_hi_b, n_lo_b;
  int out_blk, out_cnt;
  always @(negedge clk) begin
    if (s1v_a) begin
      n_ops++;
      if (s1_a[0][1]) n_hi++;
      if (s1_a[0][0]) n_lo++;
    end
    if (s1v_b) begin
      if (s1_b[0][1]) n_hi_b++;
      if (s1_b[0][0]) n_lo_b++;
    end
    if (ov_a && out_blk < NBLK) begin
      checks += 2;
      if (int'(y_a) != yexp[out_blk][out_cnt % 8][out_cnt / 8] || !ov_b) begin
        failures++;
        if (failures < 15) $display("FAIL block %0d t %0d got %0d exp %0d", out_blk, out_cnt,
                                    y_a, yexp[out_blk][out_cnt % 8][out_cnt / 8]);
      end
      if (y_b != y_a) begin
        failures++;
        if (failures < 15) $display("FAIL variants differ block %0d t %0d", out_blk, out_cnt);
      end
      if (out_cnt == 63) begin out_cnt = 0; out_blk++; end
      else out_cnt++;
    end
  end

  real ratio_hi [3];
  initial begin
    for (int k = 0; k < 8; k++) for (int n = 0; n < 8; n++) cref[k][n] = round_coef(k, n);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int py = 0; py < IMG_H; py++)
        for (int px = 0; px < IMG_W; px++) img[py][px] = frame_pixel(f, px, py);
      for (int b = 0; b < NBLK; b++) reference(b);
      n_ops = 0; n_hi = 0; n_lo = 0; n_hi_b = 0; n_lo_b = 0; out_blk = 0; out_cnt = 0;
      for (int b = 0; b < NBLK; b++)
        for (int t = 0; t < 64; t++) begin
          @(negedge clk);
          in_valid = 1;
          pixel = 8'(img[(b / NBX) * 8 + t % 8][(b % NBX) * 8 + t / 8]);
        end
      @(negedge clk);
      in_valid = 0;
      repeat (150) @(negedge clk);
      checks += 3;
      if (out_blk != NBLK) begin failures++; $display("FAIL frame %0d: %0d blocks out", f, out_blk); end
      if (n_ops != NBLK * 64) begin failures++; $display("FAIL frame %0d: %0d operands", f, n_ops); end
      if (n_lo_b != 0 || n_hi_b != n_hi) begin failures++; $display("FAIL upper-only variant skip counts"); end
      ratio_hi[f] = 100.0 * n_hi / n_ops;
      $display("frame %0d: %0d pixels, upper-group skips %0d (%0.3f %%), lower-group skips %0d (%0.3f %%)",
               f, n_ops, n_hi, ratio_hi[f], n_lo, 100.0 * n_lo / n_ops);
    end
    checks += 2;
    if (!(ratio_hi[0] > ratio_hi[1])) begin failures++; $display("FAIL smooth frame does not skip most"); end
    if (!(ratio_hi[1] > ratio_hi[2])) begin failures++; $display("FAIL textured frame does not skip least"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
