// tb_cshm_multiplier: streams operands through three multipliers sharing one
// stimulus: 8-bit unsigned X with both groups allowed to skip, the same with
// only the upper group allowed to skip, and 12-bit two's-complement X. The
// stimulus alternates smooth runs (neighbouring values, many repeated groups)
// with random values, changes the coefficient at random points and leaves
// random idle cycles. Each product must equal C*X one clock after the
// operand, and the skip flags must match the repeat rule worked out here
// (group equal to the previous operand's group, coefficient unchanged).
module tb_cshm_multiplier;
  import cshm_pkg::*;
  int checks = 0, failures = 0;
  int n_skip_hi = 0, n_skip_lo = 0, n_coef_change = 0, n_idle = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, same_coef = 0;
  logic [11:0] x = '0;
  logic signed [COEF_W-1:0] c = '0;

  logic ov_a, ov_b, ov_c;
  logic signed [15:0] p_a, p_b;
  logic signed [19:0] p_c;
  logic [1:0] sk_a, sk_b;
  logic [2:0] sk_c;

  cshm_multiplier #(.NNIB(2), .SIGNED_X(1'b0), .SKIP_EN(2'b11)) u_a (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x[7:0]), .c(c), .same_coef(same_coef),
    .out_valid(ov_a), .p(p_a), .skip(sk_a));
  cshm_multiplier #(.NNIB(2), .SIGNED_X(1'b0), .SKIP_EN(2'b10)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x[7:0]), .c(c), .same_coef(same_coef),
    .out_valid(ov_b), .p(p_b), .skip(sk_b));
  cshm_multiplier #(.NNIB(3), .SIGNED_X(1'b1), .SKIP_EN(3'b111)) u_c (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .c(c), .same_coef(same_coef),
    .out_valid(ov_c), .p(p_c), .skip(sk_c));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected values for the operand accepted in the previous cycle.
  bit          exp_valid = 0;
  int          exp_pu, exp_ps;
  logic [1:0]  exp_ska, exp_skb;
  logic [2:0]  exp_skc;
  logic [11:0] prev_x;
  bit          have_prev = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 6000; s++) begin
      @(negedge clk);
      // Check the outputs for the operand of the previous cycle.
      chk(ov_a == exp_valid && ov_b == exp_valid && ov_c == exp_valid, "out_valid timing");
      if (exp_valid) begin
        chk(int'(p_a) == exp_pu, "unsigned product (both groups skip)");
        chk(int'(p_b) == exp_pu, "unsigned product (upper group skip)");
        chk(int'(p_c) == exp_ps, "signed product");
        chk(sk_a == exp_ska, "skip flags (both groups)");
        chk(sk_b == exp_skb, "skip flags (upper only)");
        chk(sk_c == exp_skc, "skip flags (signed)");
        if (sk_a[1]) n_skip_hi++;
        if (sk_a[0]) n_skip_lo++;
      end
      // New operand.
      in_valid = ($urandom_range(0, 7) != 0);
      if (!in_valid) n_idle++;
      if (in_valid) begin
        if (!have_prev || $urandom_range(0, 9) == 0) begin
          c = COEF_W'($urandom);
          same_coef = 0;
          n_coef_change++;
        end else begin
          same_coef = 1;
        end
        if ((s / 500) % 2 == 0) x = prev_x + 12'($urandom_range(0, 2)) - 12'd1;
        else                    x = 12'($urandom);
        exp_pu = int'(x[7:0]) * int'(c);
        exp_ps = int'(signed'(x)) * int'(c);
        for (int n = 0; n < 3; n++) begin
          bit rep;
          rep = have_prev && same_coef && (x[4*n +: 4] == prev_x[4*n +: 4]);
          exp_skc[n] = rep;
          if (n < 2) exp_ska[n] = rep;
        end
        exp_skb = {exp_ska[1], 1'b0};
        prev_x = x;
        have_prev = 1;
      end
      exp_valid = in_valid;
    end
    chk(n_skip_hi > 0, "upper-group skip happened");
    chk(n_skip_lo > 0, "lower-group skip happened");
    chk(n_coef_change > 1, "coefficient change happened");
    chk(n_idle > 0, "idle cycle happened");
    $display("skips: upper %0d lower %0d, coefficient changes %0d, idle cycles %0d",
             n_skip_hi, n_skip_lo, n_coef_change, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
