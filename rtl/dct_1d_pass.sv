// dct_1d_pass: one 8-point 1-D DCT pass over an 8x8 block, built from eight
// modified CSHM multipliers, one per output frequency k.
//
// Operands arrive one per valid cycle, 64 per block, ordered column by column:
// sample t carries element (i = t mod 8, j = t div 8). Multiplier k is given
// the coefficient c(k, j), which stays fixed for the eight operands of a
// column, so the multipliers reuse their skipper registers while the column
// is streaming in (same_coef is low only on i = 0). Each product is added to
// accumulator acc[k][i], cleared by the first column, so at the end of the
// block acc[k][i] = sum_j c(k,j) * x(i,j): the DCT of row i, frequency k.
// Results are rounded, res = (acc + 2**(SHIFT-1)) >>> SHIFT, and cut to OUT_W
// bits. The design leaves the DCT datapath open: this ordering, the 64
// accumulators and the rounding are choices of this implementation.
//
// Timing: 'done' is high for one cycle, two cycles after the last operand of
// a block was accepted; res is valid in that cycle and stays valid until the
// next block's first product is accumulated (one cycle later at the
// earliest). in_valid may drop between operands (stall); there is no
// back-pressure. skip/skip_valid report, one cycle after each operand, which
// nibble groups every multiplier skipped.
module dct_1d_pass
  import cshm_pkg::*;
#(
  parameter int unsigned     NNIB     = 2,
  parameter bit              SIGNED_X = 1'b0,
  parameter logic [NNIB-1:0] SKIP_EN  = '1,
  parameter int unsigned     OUT_W    = 12,
  parameter int unsigned     SHIFT    = COEF_FRAC,
  localparam int unsigned    XW       = NNIB * NIB_W,
  localparam int unsigned    PW       = XW + COEF_W,
  localparam int unsigned    AW       = PW + 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [XW-1:0]           x,
  output logic                    done,
  output logic signed [OUT_W-1:0] res [DCT_N][DCT_N],
  output logic                    skip_valid,
  output logic [NNIB-1:0]         skip [DCT_N]
);
  // Sample counter within the block.
  logic [5:0] t;
  logic [2:0] i_in, j_in;
  assign i_in = t[2:0];
  assign j_in = t[5:3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        t <= '0;
    else if (in_valid) t <= t + 6'd1;
  end

  // Tags travelling with the products (one-cycle multiplier latency).
  logic [2:0] i_q;
  logic       first_q, last_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_q     <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (in_valid) begin
      i_q     <= i_in;
      first_q <= (j_in == 3'd0);
      last_q  <= (t == 6'd63);
    end
  end

  logic signed [PW-1:0] prod [DCT_N];
  logic [DCT_N-1:0]     pvalid;

  for (genvar k = 0; k < DCT_N; k++) begin : g_mul
    // Coefficient ROM for this frequency: c(k, j).
    logic signed [COEF_W-1:0] coef;
    always_comb begin
      coef = '0;
      for (int j = 0; j < DCT_N; j++)
        if (j_in == 3'(j)) coef = dct_coef(k, j);
    end

    cshm_multiplier #(.NNIB(NNIB), .SIGNED_X(SIGNED_X), .SKIP_EN(SKIP_EN)) u_mul (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .x         (x),
      .c         (coef),
      .same_coef (i_in != 3'd0),
      .out_valid (pvalid[k]),
      .p         (prod[k]),
      .skip      (skip[k])
    );
  end

  assign skip_valid = pvalid[0];

  // All eight multipliers see the same valid, so they stay in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    pvalid == {DCT_N{pvalid[0]}})
    else $error("dct_1d_pass: multipliers out of step");

  // Accumulators.
  logic signed [AW-1:0] acc [DCT_N][DCT_N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DCT_N; k++)
        for (int i = 0; i < DCT_N; i++)
          acc[k][i] <= '0;
      done <= 1'b0;
    end else begin
      done <= pvalid[0] && last_q;
      if (pvalid[0]) begin
        for (int k = 0; k < DCT_N; k++)
          acc[k][i_q] <= (first_q ? AW'(0) : acc[k][i_q]) + AW'(prod[k]);
      end
    end
  end

  // Rounded results.
  always_comb begin
    for (int k = 0; k < DCT_N; k++)
      for (int i = 0; i < DCT_N; i++)
        res[k][i] = OUT_W'((acc[k][i] + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT);
  end
endmodule
